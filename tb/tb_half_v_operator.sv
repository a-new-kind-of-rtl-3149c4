// tb_half_v_operator: checks that column c of the vertical operator is the
// 4-tap filter of rows A..D in column c with the mirrored taps a3..a0,
// using asymmetric coefficient sets so that the mirroring is visible.
module tb_half_v_operator;
  import subpel_pkg::*;
  import subpel_ref_pkg::*;

  localparam int NCOL = 11;
  localparam int N = DEFAULT_SHIFT;

  pixel_t row_a [NCOL], row_b [NCOL], row_c [NCOL], row_d [NCOL];
  coef_t  coef [4];
  pixel_t half [NCOL];
  int checks = 0, failures = 0;
  int cf [4];

  half_v_operator #(.NCOL(NCOL)) dut (.row_a, .row_b, .row_c, .row_d, .coef, .half);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      cf[0] = -int'($urandom_range(3));
      cf[3] = int'($urandom_range(2));
      cf[1] = 3 + int'($urandom_range(10));
      cf[2] = 16 - cf[0] - cf[1] - cf[3];
      foreach (coef[k]) coef[k] = coef_t'(cf[k]);
      for (int c = 0; c < NCOL; c++) begin
        row_a[c] = pixel_t'($urandom_range(255));
        row_b[c] = pixel_t'($urandom_range(255));
        row_c[c] = pixel_t'($urandom_range(255));
        row_d[c] = pixel_t'($urandom_range(255));
      end
      #1;
      for (int c = 0; c < NCOL; c++) begin
        int e;
        e = fir_ref(cf[3], cf[2], cf[1], cf[0], row_a[c], row_b[c], row_c[c], row_d[c], N);
        checks++;
        if (half[c] != e) begin
          failures++;
          if (failures < 10) $display("t=%0d c=%0d got %0d expected %0d", t, c, half[c], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
