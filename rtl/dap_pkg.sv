// dap_pkg: types and constants shared by the three array algorithms.
//
// The algorithms were written for a 64x64 processor array whose high-level
// language fixes every matrix at 64x64 elements, so N_DAP is 64. The integer
// type is a signed 32-bit word and the character type an unsigned byte, the
// mapping from array-language types to hardware widths used throughout.
// Logical matrices are single bits (1 = true, 0 = false).
//
// The contour algorithm shades regions with letters from a fixed code string
// of 26 characters, "ABCDEFGHIJKLMNPOQRSTUVWXYZ" (copied as printed, with P
// before O), and accepts at most 25 levels so that one letter is left for
// the cells above the highest level. code_of(k) returns the k-th letter,
// counting from 1 as the array language does. The blank written to cells
// that are not on a contour is the ASCII space; that choice, and the reset
// and start/done handshake used by the modules, belong to this design.
package dap_pkg;

  parameter int unsigned N_DAP      = 64;  // array edge length
  parameter int unsigned MAX_LEVELS = 25;  // contour levels accepted
  parameter int unsigned CODE_LEN   = 26;  // letters in the code string

  typedef logic signed [31:0] int2_t;   // INTEGER -> signed 32-bit
  typedef logic        [7:0]  charac_t; // CHARACTER -> unsigned 8-bit

  parameter charac_t BLANK = 8'h20;     // ' '

  localparam logic [8*CODE_LEN-1:0] CODE_STR = "ABCDEFGHIJKLMNPOQRSTUVWXYZ";

  // k-th character of the code string, k = 1 .. CODE_LEN; BLANK otherwise.
  function automatic charac_t code_of(input int k);
    if (k < 1 || k > int'(CODE_LEN)) return BLANK;
    return CODE_STR[8*(int'(CODE_LEN) - k) +: 8];
  endfunction

endpackage
