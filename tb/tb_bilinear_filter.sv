// tb_bilinear_filter: checks the rounding average (p + q + 1) / 2 of every
// column, the one-clock output register and the pass-through of the
// row index and last flag.
module tb_bilinear_filter;
  import subpel_pkg::*;

  localparam int W = 8;
  localparam int H = 8;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0;
  logic [2:0] in_row = '0;
  pixel_t p [W], q [W];
  logic out_valid, out_last;
  logic [2:0] out_row;
  pixel_t out_pix [W];
  int checks = 0, failures = 0;

  bilinear_filter #(.BLK_W(W), .BLK_H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ep [W];
    int erow;
    bit elast;
    foreach (p[k]) begin p[k] = '0; q[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      in_valid = 1;
      in_row   = 3'(t);
      in_last  = (t % 8 == 7);
      foreach (p[k]) begin
        p[k] = (t == 0) ? 8'd255 : pixel_t'($urandom_range(255));
        q[k] = (t == 0) ? 8'd254 : pixel_t'($urandom_range(255));
        ep[k] = (int'(p[k]) + int'(q[k]) + 1) / 2;
      end
      erow = t % 8; elast = in_last;
      @(posedge clk);
      #1;
      checks++;
      if (!out_valid || out_row != 3'(erow) || out_last != elast) begin
        failures++;
        $display("t=%0d control wrong", t);
      end
      foreach (out_pix[k]) begin
        checks++;
        if (out_pix[k] != ep[k]) begin
          failures++;
          if (failures < 10) $display("t=%0d k=%0d got %0d expected %0d", t, k, out_pix[k], ep[k]);
        end
      end
      @(negedge clk);
      in_valid = 0;
      @(posedge clk);
      #1;
      checks++;
      if (out_valid) begin failures++; $display("valid stuck high"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
