// Runs cluster_grid at the two larger grid sizes evaluated for the design,
// 8x16 and 16x16 clusters (9x17 and 17x17 towers), with the same random
// events and reference comparison as the 8x8 test.
module cluster_grid_sizes_tb;
  bit done_a, done_b;
  int checks_a, failures_a, checks_b, failures_b;

  cluster_grid_check #(.R(8),  .C(16), .NV(60)) u_8x16  (.done(done_a), .checks(checks_a), .failures(failures_a));
  cluster_grid_check #(.R(16), .C(16), .NV(40)) u_16x16 (.done(done_b), .checks(checks_b), .failures(failures_b));

  initial begin
    int failures;
    fork
      wait (done_a && done_b);
      #100000;
    join_any
    failures = failures_a + failures_b + ((done_a && done_b) ? 0 : 1);
    if (!(done_a && done_b)) $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures);
    $finish;
  end
endmodule
