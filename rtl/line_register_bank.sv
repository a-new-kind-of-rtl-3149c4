// line_register_bank: line registers 1..6 and the aligned six-line output.
//
// Stage A (one clock after a line enters the input buffer) holds
//   line 1: the integer pixels of buffer line C       (BLK_W+3 samples)
//   line 2: the first operator's 'b' results on it     (BLK_W samples)
//   line 3: the second operator's 'h' results          (BLK_W+3 samples)
// Line 3 drives the third operator outside this module, whose 'j' results
// come back on in_j. Stage B (one clock later) holds
//   line 4: 'j', line 5: line 1 shifted down, line 6: line 2 shifted down,
// and, to line up a whole output row r, three more lines: the previous
// contents of lines 5 and 6 and a copy of line 3. Together they form the six
// lines D, b, h, j, b', D' of output row r that the quarter-pel MUX chooses
// from (D, b of row r; h, j halfway between rows r and r+1; b', D' of row
// r+1). Lines 1-6, the one-clock shift from lines 1/2 to 5/6 and the clock
// spent by the third operator are the published design's; the three alignment lines
// are this design's own, since without them h and the row-r D and b are one
// row out of step with j.
//
// Timing: a buffer beat with index i (0 = first line of the block) reaches
// stage B two clocks later; out_valid is raised for i >= 3, and the output
// row is r = i - 3, so a BLK_H-row block gives BLK_H rows out of BLK_H+3
// lines in. Stage B only moves when stage A held a new line, so gaps in the
// input stream are allowed. Reset clears the valid flags and the lines.
module line_register_bank
  import subpel_pkg::*;
#(
  parameter int unsigned BLK_W = 8,
  parameter int unsigned BLK_H = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  // from the input buffer and the first and second operators
  input  logic   in_valid,
  input  logic [$clog2(BLK_H+3)-1:0] in_idx,
  input  frac_t  in_frac,
  input  pixel_t in_d    [BLK_W+3],
  input  pixel_t in_b    [BLK_W],
  input  pixel_t in_h    [BLK_W+3],
  // line 3 out to the third operator, its result back in
  output pixel_t line3   [BLK_W+3],
  input  pixel_t in_j    [BLK_W],
  // aligned six-line output for row out_row
  output logic   out_valid,
  output logic   out_last,
  output logic [$clog2(BLK_H)-1:0] out_row,
  output frac_t  out_frac,
  output pixel_t o_d     [BLK_W+3],
  output pixel_t o_b     [BLK_W],
  output pixel_t o_h     [BLK_W+3],
  output pixel_t o_j     [BLK_W],
  output pixel_t o_bp    [BLK_W],
  output pixel_t o_dp    [BLK_W+3]
);

  localparam int unsigned NCOL = BLK_W + 3;
  localparam int unsigned IW   = $clog2(BLK_H + 3);
  localparam int unsigned RW   = $clog2(BLK_H);

  // stage A
  logic          a_valid;
  logic [IW-1:0] a_idx;
  frac_t         a_frac;
  pixel_t        line1 [NCOL];
  pixel_t        line2 [BLK_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid <= 1'b0;
      a_idx   <= '0;
      a_frac  <= '0;
      for (int c = 0; c < NCOL; c++) begin
        line1[c] <= '0;
        line3[c] <= '0;
      end
      for (int c = 0; c < BLK_W; c++) line2[c] <= '0;
    end else begin
      a_valid <= in_valid;
      if (in_valid) begin
        a_idx  <= in_idx;
        a_frac <= in_frac;
        line1  <= in_d;
        line2  <= in_b;
        line3  <= in_h;
      end
    end
  end

  // stage B: lines 4, 5 (= D'), 6 (= b') and the alignment lines D, b, h.
  // o_dp and o_bp are lines 5 and 6.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_row   <= '0;
      out_frac  <= '0;
      for (int c = 0; c < NCOL; c++) begin
        o_d[c]  <= '0;
        o_h[c]  <= '0;
        o_dp[c] <= '0;
      end
      for (int c = 0; c < BLK_W; c++) begin
        o_b[c]  <= '0;
        o_j[c]  <= '0;
        o_bp[c] <= '0;
      end
    end else begin
      out_valid <= a_valid && (a_idx >= IW'(3));
      if (a_valid) begin
        out_row  <= RW'(a_idx - IW'(3));
        out_last <= (a_idx == IW'(BLK_H + 2));
        out_frac <= a_frac;
        o_d      <= o_dp;     // previous line 5
        o_b      <= o_bp;     // previous line 6
        o_h      <= line3;
        o_j      <= in_j;     // line 4
        o_bp     <= line2;    // line 6
        o_dp     <= line1;    // line 5
      end
    end
  end

endmodule
