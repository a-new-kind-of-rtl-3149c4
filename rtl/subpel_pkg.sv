// subpel_pkg: types and constants shared by the sub-pixel interpolator.
//
// A pixel is an unsigned 8-bit luma sample. Filter coefficients are signed
// 8-bit integers; the four horizontal taps (a0..a3) are supplied at run time
// and the vertical taps are their mirror image (b_i = a_(3-i)), so only one
// set is carried. The six half-pel lines held for the quarter-pel stage are
// named by line_t in the order D, b, h, j, b', D'. A quarter-pel operand is
// chosen by a sel_t: one of those lines plus a one-column right shift.
// DEFAULT_COEF (-1, 9, 9, -1) with a sum of 16 = 2^4 is this design's own
// example set; the rule it obeys (integer taps summing to 2^n, n >= 4) is the
// algorithm's.
package subpel_pkg;

  typedef logic [7:0]        pixel_t;
  typedef logic signed [7:0] coef_t;

  // Number of right-shift bits n of the half-pel filters (coefficient sum 2^n).
  localparam int unsigned DEFAULT_SHIFT = 4;
  localparam coef_t DEFAULT_COEF [4] = '{-8'sd1, 8'sd9, 8'sd9, -8'sd1};

  // The six lines of the output line buffer, in the order D, b, h, j, b', D'.
  typedef enum logic [2:0] {
    LINE_D  = 3'd0,   // integer pixels of row r
    LINE_B  = 3'd1,   // horizontal half pels of row r
    LINE_H  = 3'd2,   // vertical half pels between rows r and r+1
    LINE_J  = 3'd3,   // centre half pels between rows r and r+1
    LINE_BP = 3'd4,   // horizontal half pels of row r+1
    LINE_DP = 3'd5    // integer pixels of row r+1
  } line_t;

  typedef struct packed {
    line_t line;      // which of the six lines
    logic  shift;     // take the column one to the right
  } sel_t;

  // Motion vector fraction in quarter pels (0..3) in each direction.
  typedef struct packed {
    logic [1:0] x;
    logic [1:0] y;
  } frac_t;

endpackage
