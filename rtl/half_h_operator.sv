// half_h_operator: the horizontal half-pel operator (first and third operator).
//
// Takes one line of NOUT+3 samples and forms NOUT horizontal half-pel values
// in parallel: output k filters samples k..k+3 (a window that slides by one
// sample per output), with the taps in the order a0..a3. For an 8-wide block
// the line is 11 samples, the ten-plus-one window of the reference block, and
// eight results come out. The first operator runs on integer pixels and
// yields the 'b' values; the third runs on the line of vertical half pels and
// yields the 'j' values. Purely combinational; the caller registers the result.
module half_h_operator
  import subpel_pkg::*;
#(
  parameter int unsigned NOUT  = 8,
  parameter int unsigned SHIFT = DEFAULT_SHIFT
) (
  input  pixel_t line_in [NOUT+3],
  input  coef_t  coef    [4],      // a0..a3
  output pixel_t half    [NOUT]
);

  for (genvar k = 0; k < NOUT; k++) begin : g_tap
    pixel_t win [4];
    assign win[0] = line_in[k];
    assign win[1] = line_in[k+1];
    assign win[2] = line_in[k+2];
    assign win[3] = line_in[k+3];
    fir4 #(.SHIFT(SHIFT)) u_fir (.p(win), .coef(coef), .out(half[k]));
  end

endmodule
