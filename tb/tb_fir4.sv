// tb_fir4: checks the 4-tap half-pel filter against the formula
// (sum c_k * p_k + 2^(n-1)) >> n, clipped to 0..255, for fixed corner cases
// and random pixels and coefficient sets whose sum is 2^n.
module tb_fir4;
  import subpel_pkg::*;
  import subpel_ref_pkg::*;

  localparam int N = DEFAULT_SHIFT;

  pixel_t p [4];
  coef_t  coef [4];
  pixel_t out;
  int checks = 0, failures = 0;
  int cf [4], px [4];

  fir4 dut (.p, .coef, .out);

  task automatic check();
    int e;
    foreach (p[k]) begin p[k] = pixel_t'(px[k]); coef[k] = coef_t'(cf[k]); end
    #1;
    e = fir_ref(cf[0], cf[1], cf[2], cf[3], px[0], px[1], px[2], px[3], N);
    checks++;
    if (out != e) begin
      failures++;
      $display("coef %0d %0d %0d %0d pix %0d %0d %0d %0d: got %0d expected %0d",
               cf[0], cf[1], cf[2], cf[3], px[0], px[1], px[2], px[3], out, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cf = '{-1, 9, 9, -1};
    px = '{0, 0, 0, 0};         check();
    px = '{255, 255, 255, 255}; check();
    px = '{255, 0, 0, 255};     check();   // negative sum, clipped to 0
    px = '{0, 255, 255, 0};     check();   // above 255, clipped
    px = '{10, 20, 30, 40};     check();   // 24.375 -> round to 24 (+8)>>4
    px = '{0, 1, 0, 0};         check();   // rounding of 9/16
    px = '{0, 0, 1, 0};         check();
    for (int t = 0; t < 3000; t++) begin
      cf[0] = -int'($urandom_range(4));
      cf[3] = int'($urandom_range(6)) - 3;
      cf[1] = int'($urandom_range(14));
      cf[2] = 16 - cf[0] - cf[1] - cf[3];
      if (t % 2) begin int tmp = cf[1]; cf[1] = cf[2]; cf[2] = tmp; end
      foreach (px[k]) px[k] = (t % 7 == 0) ? 255 * int'($urandom_range(1)) : int'($urandom_range(255));
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
