// bilinear_filter: the quarter-pel bilinear filter with the output register.
//
// Out = (p + q + 1) / 2 on each of BLK_W column pairs, the rounding average
// the algorithm uses for every quarter-pel position; passing the same value
// twice returns it unchanged, which serves full- and half-pel positions.
// The result of one whole row is registered: out_pix, out_valid, out_last and
// out_row appear one clock after in_valid. The register stage is this
// design's choice. Reset clears the valid flags and the output row.
module bilinear_filter
  import subpel_pkg::*;
#(
  parameter int unsigned BLK_W = 8,
  parameter int unsigned BLK_H = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   in_last,
  input  logic [$clog2(BLK_H)-1:0] in_row,
  input  pixel_t p   [BLK_W],
  input  pixel_t q   [BLK_W],
  output logic   out_valid,
  output logic   out_last,
  output logic [$clog2(BLK_H)-1:0] out_row,
  output pixel_t out_pix [BLK_W]
);

  pixel_t avg [BLK_W];

  always_comb
    for (int c = 0; c < BLK_W; c++) avg[c] = 8'((9'(p[c]) + 9'(q[c]) + 9'd1) >> 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_row   <= '0;
      for (int c = 0; c < BLK_W; c++) out_pix[c] <= '0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid && in_last;
      if (in_valid) begin
        out_row <= in_row;
        out_pix <= avg;
      end
    end
  end

endmodule
