// half_v_operator: the vertical half-pel operator (second operator).
//
// Takes the four buffered lines A, B, C, D (top to bottom, NCOL samples each)
// and forms NCOL vertical half-pel values, one per column, in parallel.
// The vertical filter F2 uses taps b0..b3 with b_i = a_(3-i), the mirror of
// the horizontal set, which is how the algorithm ties the two filters; the
// result lies halfway between lines B and C. Purely combinational.
module half_v_operator
  import subpel_pkg::*;
#(
  parameter int unsigned NCOL  = 11,
  parameter int unsigned SHIFT = DEFAULT_SHIFT
) (
  input  pixel_t row_a [NCOL],
  input  pixel_t row_b [NCOL],
  input  pixel_t row_c [NCOL],
  input  pixel_t row_d [NCOL],
  input  coef_t  coef  [4],      // a0..a3; F2 is built from them
  output pixel_t half  [NCOL]
);

  coef_t coef_v [4];
  always_comb
    for (int k = 0; k < 4; k++) coef_v[k] = coef[3-k];

  for (genvar c = 0; c < NCOL; c++) begin : g_col
    pixel_t win [4];
    assign win[0] = row_a[c];
    assign win[1] = row_b[c];
    assign win[2] = row_c[c];
    assign win[3] = row_d[c];
    fir4 #(.SHIFT(SHIFT)) u_fir (.p(win), .coef(coef_v), .out(half[c]));
  end

endmodule
