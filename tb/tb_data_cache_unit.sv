// tb_data_cache_unit: sends lines with random idle gaps and block starts and
// checks after every accepted line that lines A..D hold the four most recent
// lines in order, that the line index counts from 0 at each block start, that
// the fraction follows its line and that out_valid lasts one clock.
module tb_data_cache_unit;
  import subpel_pkg::*;

  localparam int W = 8;
  localparam int H = 8;
  localparam int NC = W + 3;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sop = 0;
  frac_t in_frac = '0;
  pixel_t in_line [NC];
  logic out_valid;
  logic [3:0] out_idx;
  frac_t out_frac;
  pixel_t row_a [NC], row_b [NC], row_c [NC], row_d [NC];
  int checks = 0, failures = 0;

  data_cache_unit #(.BLK_W(W), .BLK_H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist [$][NC];

  task automatic cmp_row(string nm, const ref pixel_t got [NC], input int age);
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (got[c] != pixel_t'(hist[hist.size() - 1 - age][c])) begin
        failures++;
        if (failures < 10) $display("%s col %0d wrong", nm, c);
      end
    end
  endtask

  initial begin
    int idx;
    frac_t fr;
    int ln [NC];
    foreach (in_line[k]) in_line[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    idx = -1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      if ($urandom_range(3) == 0) begin
        in_valid = 0;
        @(posedge clk); #1;
        checks++;
        if (out_valid) begin failures++; $display("valid without a line"); end
        continue;
      end
      in_valid = 1;
      in_sop = (idx < 0) || (t % 11 == 0) || ($urandom_range(30) == 0);
      in_frac = frac_t'($urandom_range(15));
      fr = in_frac;
      foreach (ln[k]) begin ln[k] = $urandom_range(255); in_line[k] = pixel_t'(ln[k]); end
      hist.push_back(ln);
      idx = in_sop ? 0 : idx + 1;
      @(posedge clk); #1;
      checks += 3;
      if (!out_valid) begin failures++; $display("no valid"); end
      if (int'(out_idx) != (idx % 16)) begin failures++; $display("idx %0d expected %0d", out_idx, idx); end
      if (out_frac != fr) begin failures++; $display("frac wrong"); end
      if (hist.size() >= 4) begin
        cmp_row("D", row_d, 0);
        cmp_row("C", row_c, 1);
        cmp_row("B", row_b, 2);
        cmp_row("A", row_a, 3);
      end
      @(negedge clk);
      in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
