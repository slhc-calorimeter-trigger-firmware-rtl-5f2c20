// Testbench for cluster_grid at its default 8x8 size: 150 random events,
// one per cycle, each cluster record compared with the reference model
// 7 cycles later (see cluster_grid_check).
module cluster_grid_tb;
  bit done;
  int checks, failures;

  cluster_grid_check u_check (.done, .checks, .failures);

  initial begin
    fork
      wait (done);
      #100000;
    join_any
    if (!done) begin
      failures++;
      $display("FAIL: watchdog");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
