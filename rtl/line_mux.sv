// line_mux: one operand port of the quarter-pel MUX.
//
// Chooses one of the six lines D, b, h, j, b', D' of the output line buffer
// and presents BLK_W samples aligned to the block columns 0..BLK_W-1.
// Integer and vertical half-pel lines (D, h, D') carry BLK_W+3 samples that
// start one column left of the block, so column c is sample c+1, or c+2 when
// sel.shift asks for the right-hand neighbour. The 'b'-type lines (b, j, b')
// carry BLK_W samples, column c being the half pel right of block column c;
// shift is ignored for them. The MUX is part of the published block structure; its selection
// rule is this design's. Purely combinational.
module line_mux
  import subpel_pkg::*;
#(
  parameter int unsigned BLK_W = 8
) (
  input  sel_t   sel,
  input  pixel_t l_d   [BLK_W+3],
  input  pixel_t l_b   [BLK_W],
  input  pixel_t l_h   [BLK_W+3],
  input  pixel_t l_j   [BLK_W],
  input  pixel_t l_bp  [BLK_W],
  input  pixel_t l_dp  [BLK_W+3],
  output pixel_t opnd  [BLK_W]
);

  always_comb begin
    for (int c = 0; c < BLK_W; c++) begin
      unique case (sel.line)
        LINE_D:  opnd[c] = sel.shift ? l_d[c+2]  : l_d[c+1];
        LINE_B:  opnd[c] = l_b[c];
        LINE_H:  opnd[c] = sel.shift ? l_h[c+2]  : l_h[c+1];
        LINE_J:  opnd[c] = l_j[c];
        LINE_BP: opnd[c] = l_bp[c];
        default: opnd[c] = sel.shift ? l_dp[c+2] : l_dp[c+1];
      endcase
    end
  end

endmodule
