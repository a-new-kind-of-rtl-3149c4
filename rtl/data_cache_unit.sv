// data_cache_unit: input buffer of four line registers (A, B, C, D).
//
// The reference area of a BLK_W x BLK_H block, extended by one sample on the
// left and top and by two on the right and bottom, arrives one line of
// BLK_W+3 pixels per accepted beat (in_valid). Each beat shifts the four
// lines up by one (A <- B <- C <- D <- new line), so after a beat the buffer
// holds the four most recent lines, the newest in D. The line counter
// restarts at 0 on a beat with in_sop (first line of a block) and out_idx
// gives the index of the line now in D. The motion-vector fraction
// travels with each line. out_valid is high for the one cycle after a beat.
// That the buffer is four line registers fed from the reference store is the
// published design's; the start-of-block marker, the counter and the per-line
// fraction are this design's own. Reset clears the buffer and the valid flag.
module data_cache_unit
  import subpel_pkg::*;
#(
  parameter int unsigned BLK_W = 8,
  parameter int unsigned BLK_H = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   in_sop,
  input  frac_t  in_frac,
  input  pixel_t in_line [BLK_W+3],
  output logic   out_valid,
  output logic [$clog2(BLK_H+3)-1:0] out_idx,
  output frac_t  out_frac,
  output pixel_t row_a [BLK_W+3],
  output pixel_t row_b [BLK_W+3],
  output pixel_t row_c [BLK_W+3],
  output pixel_t row_d [BLK_W+3]
);

  localparam int unsigned NCOL = BLK_W + 3;
  localparam int unsigned IW   = $clog2(BLK_H + 3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_frac  <= '0;
      for (int c = 0; c < NCOL; c++) begin
        row_a[c] <= '0;
        row_b[c] <= '0;
        row_c[c] <= '0;
        row_d[c] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_idx  <= in_sop ? '0 : out_idx + IW'(1);
        out_frac <= in_frac;
        row_a    <= row_b;
        row_b    <= row_c;
        row_c    <= row_d;
        row_d    <= in_line;
      end
    end
  end

endmodule
