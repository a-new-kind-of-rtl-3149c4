// tb_line_mux: checks every line and shift choice of the MUX against the
// column alignment rule (D/h/D' sample c+1 or c+2, b/j/b' sample c).
module tb_line_mux;
  import subpel_pkg::*;

  localparam int W = 8;

  sel_t   sel;
  pixel_t l_d [W+3], l_b [W], l_h [W+3], l_j [W], l_bp [W], l_dp [W+3];
  pixel_t opnd [W];
  int checks = 0, failures = 0;

  line_mux #(.BLK_W(W)) dut (.sel, .l_d, .l_b, .l_h, .l_j, .l_bp, .l_dp, .opnd);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      foreach (l_d[k])  l_d[k]  = pixel_t'($urandom_range(255));
      foreach (l_h[k])  l_h[k]  = pixel_t'($urandom_range(255));
      foreach (l_dp[k]) l_dp[k] = pixel_t'($urandom_range(255));
      foreach (l_b[k])  l_b[k]  = pixel_t'($urandom_range(255));
      foreach (l_j[k])  l_j[k]  = pixel_t'($urandom_range(255));
      foreach (l_bp[k]) l_bp[k] = pixel_t'($urandom_range(255));
      for (int l = 0; l < 6; l++)
        for (int sh = 0; sh < 2; sh++) begin
          sel = '{line: line_t'(l), shift: sh[0]};
          #1;
          for (int c = 0; c < W; c++) begin
            pixel_t e;
            case (l)
              0: e = l_d[c + 1 + sh];
              1: e = l_b[c];
              2: e = l_h[c + 1 + sh];
              3: e = l_j[c];
              4: e = l_bp[c];
              default: e = l_dp[c + 1 + sh];
            endcase
            checks++;
            if (opnd[c] != e) begin
              failures++;
              if (failures < 10) $display("line %0d shift %0d col %0d: got %0d expected %0d", l, sh, c, opnd[c], e);
            end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
