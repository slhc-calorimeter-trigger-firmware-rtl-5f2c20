// Testbench for cluster_overlap_filter: random clusters every cycle with
// neighbour sums drawn close to the cluster's own sum (so that ties and
// pruning in every direction occur). The neighbour sums are presented one
// cycle after the towers, when the filter's own et_sum appears. Checks
// et_sum after one cycle and mask, central and thresholded ET four cycles
// after the towers.
module cluster_overlap_filter_tb;
  import calo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              in_valid, central, out_valid;
  tower_et_t [3:0]   tower_et;
  cluster_et_t       et_sum, cluster_thr, et;
  cluster_et_t [7:0] nbr_et;
  logic [3:0]        mask;

  cluster_overlap_filter dut (.*);

  localparam int LAT = 4, NV = 4000;
  int checks = 0, failures = 0, n_central = 0, n_pruned = 0, n_thr = 0, n_tie = 0;
  tower_et_t [3:0]   tw [NV];
  cluster_et_t [7:0] nb [NV];
  int exp_sum [NV], exp_et [NV];
  logic [3:0] exp_mask [NV];
  // shared towers per direction NW, N, NE, W, E, SW, S, SE
  logic [3:0] ovl [8] = '{4'b0001, 4'b0011, 4'b0010, 4'b0101, 4'b1010, 4'b0100, 4'b1100, 4'b1000};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NV; i++) begin
      int s, p;
      s = 0;
      for (int k = 0; k < 4; k++) begin
        tw[i][k] = (i % 5 == 0) ? tower_et_t'($urandom % 4) : tower_et_t'($urandom);
        s += tw[i][k];
      end
      exp_sum[i] = s;
      exp_mask[i] = '0;
      for (int n = 0; n < 8; n++) begin
        int d;
        d = int'($urandom % 9) - 4 - ((i % 7 == 0) ? 6 : 0);
        nb[i][n] = (s + d < 0) ? '0 : cluster_et_t'(s + d);
        if (int'(nb[i][n]) > s || (n >= 4 && int'(nb[i][n]) == s)) exp_mask[i] |= ovl[n];
        if (int'(nb[i][n]) == s) n_tie++;
      end
      p = 0;
      for (int k = 0; k < 4; k++) if (!exp_mask[i][k]) p += tw[i][k];
      exp_et[i] = p;  // threshold applied when checking
    end
  end

  initial begin
    in_valid = 0; tower_et = '0; nbr_et = '0; cluster_thr = 11'd100;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < NV + LAT + 1; i++) begin
      in_valid = i < NV;
      tower_et = (i < NV) ? tw[i] : '0;
      nbr_et   = (i >= 1 && i - 1 < NV) ? nb[i-1] : '0;
      @(posedge clk); #1;
      if (i < NV) check(int'(et_sum) == exp_sum[i], $sformatf("et_sum %0d", i));
      if (i >= LAT - 1 && i - (LAT - 1) < NV) begin
        int j, e;
        j = i - (LAT - 1);
        e = (exp_et[j] >= 100) ? exp_et[j] : 0;
        check(out_valid, "out_valid");
        check(mask == exp_mask[j], $sformatf("mask %0d: %b exp %b", j, mask, exp_mask[j]));
        check(central == (exp_mask[j] == 0), $sformatf("central %0d", j));
        check(int'(et) == e, $sformatf("et %0d: %0d exp %0d", j, et, e));
        if (central) n_central++; else n_pruned++;
        if (exp_et[j] > 0 && e == 0) n_thr++;
      end
    end
    check(n_central > 0 && n_pruned > 0 && n_thr > 0 && n_tie > 0, "coverage");
    $display("central=%0d pruned=%0d below-threshold=%0d ties=%0d", n_central, n_pruned, n_thr, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
