// tb_subpel_block_sizes: runs the interpolator at the other block sizes the
// algorithm is evaluated for, 4x4 (7x7 reference data) and 16x16 (19x19),
// and at a larger filter shift n = 5 (coefficient sum 32) on 8x8 blocks,
// each instance checked row by row against the reference model.
module tb_subpel_block_sizes;
  logic d4, d16, d8n5;
  int   c4, c16, c8n5, f4, f16, f8n5;
  int checks, failures;

  subpel_size_harness #(.W(4),  .H(4),  .N(4), .NBLK(48)) u_4x4   (.done(d4),   .checks(c4),   .failures(f4));
  subpel_size_harness #(.W(16), .H(16), .N(4), .NBLK(40)) u_16x16 (.done(d16),  .checks(c16),  .failures(f16));
  subpel_size_harness #(.W(8),  .H(8),  .N(5), .NBLK(40)) u_8x8n5 (.done(d8n5), .checks(c8n5), .failures(f8n5));

  initial begin
    #5000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c16 + c8n5, f4 + f16 + f8n5 + 1);
    $finish;
  end

  initial begin
    wait (d4 && d16 && d8n5);
    checks = c4 + c16 + c8n5;
    failures = f4 + f16 + f8n5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
