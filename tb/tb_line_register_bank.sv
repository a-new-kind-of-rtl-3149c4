// tb_line_register_bank: feeds random D, b and h lines as if from the input
// buffer and the first two operators (with gaps between beats), returns
// j = line 3 XOR 0x5A from a stand-in for the third operator, and checks
// that each output row r = i - 3 presents D and b of beat i-1, h and j of
// beat i and b', D' of beat i, two clocks after beat i, with the right row
// index, last flag and fraction.
module tb_line_register_bank;
  import subpel_pkg::*;

  localparam int W = 8;
  localparam int H = 8;
  localparam int NC = W + 3;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [3:0] in_idx = '0;
  frac_t in_frac = '0;
  pixel_t in_d [NC], in_b [W], in_h [NC], line3 [NC], in_j [W];
  logic out_valid, out_last;
  logic [2:0] out_row;
  frac_t out_frac;
  pixel_t o_d [NC], o_b [W], o_h [NC], o_j [W], o_bp [W], o_dp [NC];
  int checks = 0, failures = 0;

  line_register_bank #(.BLK_W(W), .BLK_H(H)) dut (.*);

  // stand-in third operator
  always_comb for (int k = 0; k < W; k++) in_j[k] = line3[k] ^ 8'h5A;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hd [$][NC], hb [$][W], hh [$][NC];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("%s", what); end
  endtask

  initial begin
    int d [NC], b [W], h [NC];
    frac_t fr;
    foreach (in_d[k]) begin in_d[k] = '0; in_h[k] = '0; end
    foreach (in_b[k]) in_b[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 30; blk++) begin
      fr = frac_t'($urandom_range(15));
      hd.delete(); hb.delete(); hh.delete();
      for (int i = 0; i < H + 3; i++) begin
        @(negedge clk);
        foreach (d[k]) d[k] = $urandom_range(255);
        foreach (b[k]) b[k] = $urandom_range(255);
        foreach (h[k]) h[k] = $urandom_range(255);
        hd.push_back(d); hb.push_back(b); hh.push_back(h);
        in_valid = 1; in_idx = 4'(i); in_frac = fr;
        foreach (in_d[k]) in_d[k] = pixel_t'(d[k]);
        foreach (in_b[k]) in_b[k] = pixel_t'(b[k]);
        foreach (in_h[k]) in_h[k] = pixel_t'(h[k]);
        @(posedge clk);                 // stage A loads
        @(negedge clk);
        in_valid = 0;
        @(posedge clk); #1;             // stage B loads
        chk(out_valid == (i >= 3), $sformatf("valid wrong at beat %0d", i));
        if (i >= 3) begin
          chk(int'(out_row) == i - 3, "row index wrong");
          chk(out_last == (i == H + 2), "last flag wrong");
          chk(out_frac == fr, "fraction wrong");
          for (int k = 0; k < NC; k++) begin
            chk(o_d[k]  == pixel_t'(hd[i-1][k]), "D wrong");
            chk(o_h[k]  == pixel_t'(hh[i][k]), "h wrong");
            chk(o_dp[k] == pixel_t'(hd[i][k]), "D' wrong");
          end
          for (int k = 0; k < W; k++) begin
            chk(o_b[k]  == pixel_t'(hb[i-1][k]), "b wrong");
            chk(o_bp[k] == pixel_t'(hb[i][k]), "b' wrong");
            chk(o_j[k]  == (pixel_t'(hh[i][k]) ^ 8'h5A), "j wrong");
          end
        end
        if (blk % 2) repeat ($urandom_range(2)) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
