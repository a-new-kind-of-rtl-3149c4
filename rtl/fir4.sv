// fir4: one 4-tap half-pel interpolation filter (one element of an operator).
//
// out = clip((c0*p0 + c1*p1 + c2*p2 + c3*p3 + 2^(SHIFT-1)) >> SHIFT)
//
// The tap-weighted sum, the rounding constant 2^(n-1) and the division by
// 2^n follow the algorithm; the coefficients are inputs so that they can be
// changed while their sum stays 2^n. The division is an arithmetic right
// shift (rounds toward minus infinity for negative sums) and the result is
// clipped to 0..255; both are this design's choice. Purely combinational.
module fir4
  import subpel_pkg::*;
#(
  parameter int unsigned SHIFT = DEFAULT_SHIFT   // n, coefficient sum 2^n
) (
  input  pixel_t p    [4],   // taps in order: p0 is multiplied by c0
  input  coef_t  coef [4],
  output pixel_t out
);

  localparam int unsigned SW = 20;   // 4 * (8b x 8b signed) fits in 18b

  logic signed [SW-1:0] acc;
  logic signed [SW-1:0] shifted;

  always_comb begin
    acc = SW'(signed'(1) <<< (SHIFT - 1));
    for (int k = 0; k < 4; k++)
      acc += SW'(signed'({1'b0, p[k]}) * coef[k]);
    shifted = acc >>> SHIFT;
    if (shifted < 0)
      out = 8'd0;
    else if (shifted > 255)
      out = 8'd255;
    else
      out = shifted[7:0];
  end

endmodule
