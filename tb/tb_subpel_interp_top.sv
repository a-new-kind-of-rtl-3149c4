// tb_subpel_interp_top: end-to-end test of the interpolator at its default
// size (8x8 blocks, n = 4). Sends many reference areas, all sixteen
// quarter-pel positions, several coefficient sets (changed only while the
// pipeline is empty), random and extreme pixel data, back-to-back blocks and
// blocks with idle gaps between lines, and compares every output row with the
// reference model, including the clock at which it appears (3 clocks after
// the line r+3 of the area is accepted).
module tb_subpel_interp_top;
  import subpel_pkg::*;
  import subpel_ref_pkg::*;

  localparam int W = 8;
  localparam int H = 8;
  localparam int N = DEFAULT_SHIFT;
  localparam int NBLK = 120;

  logic   clk = 0;
  logic   rst_n = 0;
  coef_t  coef [4];
  logic   in_valid = 0, in_sop = 0;
  frac_t  in_frac = '0;
  pixel_t in_line [W+3];
  logic   out_valid, out_last;
  logic [$clog2(H)-1:0] out_row;
  pixel_t out_pix [W];

  subpel_interp_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // expected rows
  typedef struct { int pix[W]; int row; longint when; } exp_t;
  exp_t expq[$];

  // mechanism counters
  int pos_seen [16];
  int n_gaps = 0, n_b2b = 0, n_coef_change = 0, n_clip_lo = 0, n_clip_hi = 0, n_last = 0;

  area_t area;
  int cf [4];

  function automatic void count_clips(const ref area_t a, input int cf[4]);
    for (int r = -1; r <= H; r++)
      for (int c = -1; c <= W; c++) begin
        int s;
        if (c >= 0 && c < W) begin
          s = cf[0]*g(a,r,c-1) + cf[1]*g(a,r,c) + cf[2]*g(a,r,c+1) + cf[3]*g(a,r,c+2) + (1 << (N-1));
          if (r >= 0 && r <= H && (s >>> N) < 0) n_clip_lo++;
          if (r >= 0 && r <= H && (s >>> N) > 255) n_clip_hi++;
        end
      end
  endfunction

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected output row %0d", out_row);
      end else begin
        exp_t e;
        e = expq.pop_front();
        checks++;
        if (out_row != e.row || cycle != e.when) begin
          failures++;
          $display("row %0d at cycle %0d, expected row %0d at %0d", out_row, cycle, e.row, e.when);
        end
        for (int c = 0; c < W; c++) begin
          checks++;
          if (out_pix[c] != e.pix[c]) begin
            failures++;
            if (failures < 20)
              $display("row %0d col %0d: got %0d expected %0d", e.row, c, out_pix[c], e.pix[c]);
          end
        end
        if (out_last != (e.row == H-1)) begin
          failures++;
          $display("out_last wrong at row %0d", e.row);
        end
        if (out_last) n_last++;
      end
    end
  end

  initial begin
    int mode, xf, yf;
    bit gaps, drain;
    cf = '{-1, 9, 9, -1};
    foreach (coef[k]) coef[k] = coef_t'(cf[k]);
    foreach (in_line[k]) in_line[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int blk = 0; blk < NBLK; blk++) begin
      // every 10th block: let the pipeline drain and load new coefficients
      drain = (blk % 10 == 9);
      if (drain) begin
        in_valid <= 0;
        repeat (6) @(posedge clk);
        case ((blk / 10) % 4)
          0: cf = '{-2, 10, 10, -2};
          1: cf = '{0, 8, 8, 0};
          2: cf = '{-1, 12, 6, -1};
          default: begin
            cf[0] = -int'($urandom_range(3));
            cf[3] = -int'($urandom_range(3));
            cf[1] = 6 + int'($urandom_range(6));
            cf[2] = 16 - cf[0] - cf[1] - cf[3];
          end
        endcase
        foreach (coef[k]) coef[k] = coef_t'(cf[k]);
        n_coef_change++;
      end else if (blk > 0) n_b2b++;
      xf = blk % 4;
      yf = (blk / 4) % 4;
      mode = blk % 3;
      gaps = (blk % 5 == 2);
      for (int r = 0; r < H+3; r++)
        for (int c = 0; c < W+3; c++)
          case (mode)
            0: area[r][c] = $urandom_range(255);
            1: area[r][c] = ((r + c) % 2) ? 255 : 0;
            default: area[r][c] = (c % 3 == 1) ? 255 : $urandom_range(40);
          endcase
      pos_seen[yf*4 + xf]++;
      count_clips(area, cf);
      for (int i = 0; i < H+3; i++) begin
        if (gaps && i > 0) begin
          in_valid <= 0;
          repeat (1 + $urandom_range(2)) @(posedge clk);
          n_gaps++;
        end
        in_valid <= 1;
        in_sop   <= (i == 0);
        in_frac  <= '{x: 2'(xf), y: 2'(yf)};
        for (int c = 0; c < W+3; c++) in_line[c] <= pixel_t'(area[i][c]);
        if (i >= 3) begin
          exp_t e;
          e.row  = i - 3;
          // accepted at the next edge, registered at the output 3 edges later,
          // seen by the monitor at the edge after that
          e.when = cycle + 1 + 3 + 1;
          for (int c = 0; c < W; c++) e.pix[c] = qpel_ref(area, i-3, c, xf, yf, cf, N);
          expq.push_back(e);
        end
        @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    if (expq.size() != 0) begin
      failures++;
      $display("%0d rows never came out", expq.size());
    end
    for (int p = 0; p < 16; p++) begin
      checks++;
      if (pos_seen[p] == 0) begin failures++; $display("position %0d never used", p); end
    end
    checks += 6;
    if (n_gaps == 0)        begin failures++; $display("no input gaps"); end
    if (n_b2b == 0)         begin failures++; $display("no back-to-back blocks"); end
    if (n_coef_change == 0) begin failures++; $display("no coefficient change"); end
    if (n_clip_lo == 0)     begin failures++; $display("no clipping at 0"); end
    if (n_clip_hi == 0)     begin failures++; $display("no clipping at 255"); end
    if (n_last != NBLK)     begin failures++; $display("saw %0d last rows", n_last); end
    $display("blocks=%0d gaps=%0d back_to_back=%0d coef_changes=%0d clip_lo=%0d clip_hi=%0d",
             NBLK, n_gaps, n_b2b, n_coef_change, n_clip_lo, n_clip_hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
