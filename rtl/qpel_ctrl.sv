// qpel_ctrl: quarter-pel selection control (SEL1, SEL2).
//
// Maps the motion-vector fraction (X_Frac, Y_Frac), in quarter pels, to the
// two operands of the bilinear average. Each select names one of the six
// lines D, b, h, j, b', D' and whether to take the column one to the right
// (the neighbour E of D, m of h, I of D'). Full- and half-pel positions
// select the same line twice, so the average passes the value through.
//   y\x   0        1        2        3
//   0    D,D      D,b      b,b      b,D>>
//   1    D,h      D,j      b,j      D>>,j
//   2    h,h      h,j      j,j      j,h>>
//   3    h,D'     D',j     j,b'     D'>>,j
// (">>" = shifted one column right.) The horizontal, vertical and centre
// averages follow the standard quarter-pel rules; the four diagonal positions
// e, g, p, r average the nearest integer pixel with j, which is how the
// published algorithm defines e. Purely combinational.
module qpel_ctrl
  import subpel_pkg::*;
(
  input  frac_t frac,
  output sel_t  sel1,
  output sel_t  sel2
);

  function automatic sel_t s(line_t l, logic sh);
    return '{line: l, shift: sh};
  endfunction

  always_comb begin
    unique case ({frac.y, frac.x})
      4'b00_00: begin sel1 = s(LINE_D,  1'b0); sel2 = s(LINE_D,  1'b0); end // G
      4'b00_01: begin sel1 = s(LINE_D,  1'b0); sel2 = s(LINE_B,  1'b0); end // a
      4'b00_10: begin sel1 = s(LINE_B,  1'b0); sel2 = s(LINE_B,  1'b0); end // b
      4'b00_11: begin sel1 = s(LINE_B,  1'b0); sel2 = s(LINE_D,  1'b1); end // c
      4'b01_00: begin sel1 = s(LINE_D,  1'b0); sel2 = s(LINE_H,  1'b0); end // d
      4'b01_01: begin sel1 = s(LINE_D,  1'b0); sel2 = s(LINE_J,  1'b0); end // e
      4'b01_10: begin sel1 = s(LINE_B,  1'b0); sel2 = s(LINE_J,  1'b0); end // f
      4'b01_11: begin sel1 = s(LINE_D,  1'b1); sel2 = s(LINE_J,  1'b0); end // g
      4'b10_00: begin sel1 = s(LINE_H,  1'b0); sel2 = s(LINE_H,  1'b0); end // h
      4'b10_01: begin sel1 = s(LINE_H,  1'b0); sel2 = s(LINE_J,  1'b0); end // i
      4'b10_10: begin sel1 = s(LINE_J,  1'b0); sel2 = s(LINE_J,  1'b0); end // j
      4'b10_11: begin sel1 = s(LINE_J,  1'b0); sel2 = s(LINE_H,  1'b1); end // k
      4'b11_00: begin sel1 = s(LINE_H,  1'b0); sel2 = s(LINE_DP, 1'b0); end // n
      4'b11_01: begin sel1 = s(LINE_DP, 1'b0); sel2 = s(LINE_J,  1'b0); end // p
      4'b11_10: begin sel1 = s(LINE_J,  1'b0); sel2 = s(LINE_BP, 1'b0); end // q
      default:  begin sel1 = s(LINE_DP, 1'b1); sel2 = s(LINE_J,  1'b0); end // r
    endcase
  end

endmodule
