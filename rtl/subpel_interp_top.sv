// subpel_interp_top: quarter-pel luma interpolator for one reference block.
//
// For a BLK_W x BLK_H block it takes the (BLK_W+3) x (BLK_H+3) reference area
// (one extra sample left/top, two right/bottom) one line per beat and returns
// the block at the quarter-pel offset (X_Frac, Y_Frac), one row of BLK_W
// pixels per clock. Half pels come from 4-tap filters whose coefficients
// a0..a3 are inputs (their sum must be 2^SHIFT, SHIFT >= 4; the vertical
// filter uses them mirrored); quarter pels are rounding averages of two of
// the six half-pel lines D, b, h, j, b', D'.
//
// Datapath, as in the published design's block structure:
//   input buffer (4 lines) -> first operator (horizontal, on line C, 'b')
//                          -> second operator (vertical, on lines A..D, 'h')
//   line 3 ('h') -> third operator (horizontal, 'j')
//   line registers 1..6 -> six-line output -> MUX (SEL1, SEL2) -> bilinear.
//
// Interface: in_valid accepts a line; in_sop marks the first line of a block;
// in_frac must be held for all lines of a block, and coef must not change
// while a block is anywhere in the pipeline (the operators read it
// combinationally). out_valid marks a finished row, out_row its index and
// out_last the block's last row. The coefficient-sum assertion samples rst_n
// synchronously while the registers use it asynchronously; lint notes this
// and it is intended.
// Timing: the row r output appears 3 clocks after the line r+3 (counting from 0) of the
// reference area is accepted (input buffer, stage A, stage B, output
// register: 1 + 1 + 1 clocks after the buffer), so with back-to-back input a
// block takes BLK_H+3 beats plus 3 clocks of latency, and the next block can
// follow immediately. The handshake signals and the latency accounting are
// this design's own.
module subpel_interp_top
  import subpel_pkg::*;
#(
  parameter int unsigned BLK_W = 8,
  parameter int unsigned BLK_H = 8,
  parameter int unsigned SHIFT = DEFAULT_SHIFT
) (
  input  logic   clk,
  input  logic   rst_n,
  input  coef_t  coef    [4],           // a0..a3, sum 2^SHIFT
  input  logic   in_valid,
  input  logic   in_sop,
  input  frac_t  in_frac,               // {X_Frac, Y_Frac}
  input  pixel_t in_line [BLK_W+3],
  output logic   out_valid,
  output logic   out_last,
  output logic [$clog2(BLK_H)-1:0] out_row,
  output pixel_t out_pix [BLK_W]
);

  localparam int unsigned NCOL = BLK_W + 3;

  // The method requires n >= 4 (coefficient sum at least 16).
  if (SHIFT < 4) begin : g_bad_shift
    $error("SHIFT must be at least 4");
  end

  // input buffer
  logic                          buf_valid;
  logic [$clog2(BLK_H+3)-1:0]    buf_idx;
  frac_t                         buf_frac;
  pixel_t row_a [NCOL], row_b [NCOL], row_c [NCOL], row_d [NCOL];

  data_cache_unit #(.BLK_W(BLK_W), .BLK_H(BLK_H)) u_cache (
    .clk, .rst_n, .in_valid, .in_sop, .in_frac, .in_line,
    .out_valid(buf_valid), .out_idx(buf_idx), .out_frac(buf_frac),
    .row_a, .row_b, .row_c, .row_d
  );

  // first operator: horizontal half pels 'b' of line C
  pixel_t b_new [BLK_W];
  half_h_operator #(.NOUT(BLK_W), .SHIFT(SHIFT)) u_op1 (
    .line_in(row_c), .coef, .half(b_new)
  );

  // second operator: vertical half pels 'h' between lines B and C
  pixel_t h_new [NCOL];
  half_v_operator #(.NCOL(NCOL), .SHIFT(SHIFT)) u_op2 (
    .row_a, .row_b, .row_c, .row_d, .coef, .half(h_new)
  );

  // line registers; the third operator sits between line 3 and line 4
  pixel_t line3 [NCOL];
  pixel_t j_new [BLK_W];
  logic   six_valid, six_last;
  logic [$clog2(BLK_H)-1:0] six_row;
  frac_t  six_frac;
  pixel_t l_d [NCOL], l_b [BLK_W], l_h [NCOL], l_j [BLK_W], l_bp [BLK_W], l_dp [NCOL];

  half_h_operator #(.NOUT(BLK_W), .SHIFT(SHIFT)) u_op3 (
    .line_in(line3), .coef, .half(j_new)
  );

  line_register_bank #(.BLK_W(BLK_W), .BLK_H(BLK_H)) u_lines (
    .clk, .rst_n,
    .in_valid(buf_valid), .in_idx(buf_idx), .in_frac(buf_frac),
    .in_d(row_c), .in_b(b_new), .in_h(h_new),
    .line3, .in_j(j_new),
    .out_valid(six_valid), .out_last(six_last), .out_row(six_row), .out_frac(six_frac),
    .o_d(l_d), .o_b(l_b), .o_h(l_h), .o_j(l_j), .o_bp(l_bp), .o_dp(l_dp)
  );

  // quarter-pel selection, MUX and bilinear filter
  sel_t   sel1, sel2;
  pixel_t opnd1 [BLK_W], opnd2 [BLK_W];

  qpel_ctrl u_ctrl (.frac(six_frac), .sel1, .sel2);

  line_mux #(.BLK_W(BLK_W)) u_mux1 (
    .sel(sel1), .l_d, .l_b, .l_h, .l_j, .l_bp, .l_dp, .opnd(opnd1)
  );
  line_mux #(.BLK_W(BLK_W)) u_mux2 (
    .sel(sel2), .l_d, .l_b, .l_h, .l_j, .l_bp, .l_dp, .opnd(opnd2)
  );

  bilinear_filter #(.BLK_W(BLK_W), .BLK_H(BLK_H)) u_bilin (
    .clk, .rst_n,
    .in_valid(six_valid), .in_last(six_last), .in_row(six_row),
    .p(opnd1), .q(opnd2),
    .out_valid, .out_last, .out_row, .out_pix
  );

  // The algorithm requires the four coefficients to sum to 2^SHIFT.
  logic signed [9:0] coef_sum;
  assign coef_sum = 10'(coef[0]) + 10'(coef[1]) + 10'(coef[2]) + 10'(coef[3]);

  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid |-> coef_sum == 10'(1 << SHIFT))
    else $error("filter coefficients do not sum to 2^%0d", SHIFT);

endmodule
