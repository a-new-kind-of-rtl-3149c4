// tb_half_h_operator: checks that output k of the horizontal operator is the
// 4-tap filter of input samples k..k+3, for the 8-output (11-sample) size.
module tb_half_h_operator;
  import subpel_pkg::*;
  import subpel_ref_pkg::*;

  localparam int NOUT = 8;
  localparam int N = DEFAULT_SHIFT;

  pixel_t line_in [NOUT+3];
  coef_t  coef [4];
  pixel_t half [NOUT];
  int checks = 0, failures = 0;
  int cf [4];

  half_h_operator #(.NOUT(NOUT)) dut (.line_in, .coef, .half);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      cf[0] = -int'($urandom_range(3));
      cf[3] = -int'($urandom_range(2));
      cf[1] = 2 + int'($urandom_range(10));
      cf[2] = 16 - cf[0] - cf[1] - cf[3];
      foreach (coef[k]) coef[k] = coef_t'(cf[k]);
      foreach (line_in[k]) line_in[k] = (t % 4 == 0) ? pixel_t'(k * 23) : pixel_t'($urandom_range(255));
      #1;
      for (int k = 0; k < NOUT; k++) begin
        int e;
        e = fir_ref(cf[0], cf[1], cf[2], cf[3],
                    line_in[k], line_in[k+1], line_in[k+2], line_in[k+3], N);
        checks++;
        if (half[k] != e) begin
          failures++;
          if (failures < 10) $display("t=%0d k=%0d got %0d expected %0d", t, k, half[k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
