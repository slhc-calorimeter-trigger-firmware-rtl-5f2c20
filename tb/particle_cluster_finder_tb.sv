// Testbench for particle_cluster_finder: random 2x2 clusters every cycle
// with a random tower threshold. Checks the thresholded tower E+H after
// stage 1 and, four cycles after the inputs, the tower E+H, the fine-grain
// OR and the e/gamma bit, against a reference computed here. The EPIM
// ratio is configuration: it changes every 500 inputs, and the e/gamma bit
// is not checked for the inputs already in flight when it changes.
module particle_cluster_finder_tb;
  import calo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                   in_valid;
  logic [3:0][ECAL_W-1:0] ecal;
  logic [3:0][HCAL_W-1:0] hcal;
  logic [3:0]             fg_in;
  tower_et_t              tower_thr;
  logic [2:0]             epim_shift;
  tower_et_t [3:0]        tower_et_s1, tower_et;
  logic                   egamma, fg, out_valid;

  particle_cluster_finder dut (.*);

  localparam int LAT = 4, NV = 3000;
  int checks = 0, failures = 0, n_zeroed = 0, n_eg = 0, n_fg = 0;
  tower_et_t [3:0] exp_t [NV];
  bit exp_eg [NV], exp_fg [NV];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; ecal = '0; hcal = '0; fg_in = '0; tower_thr = '0; epim_shift = 3;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < NV + LAT; i++) begin
      if (i < NV) begin
        int es, hs;
        tower_thr  = tower_et_t'($urandom % 200);
        epim_shift = 3'((i / 500) % 5);  // configuration held, changed rarely
        es = 0; hs = 0;
        for (int k = 0; k < 4; k++) begin
          ecal[k] = 8'($urandom);
          hcal[k] = (i % 2) ? 8'($urandom % 8) : 8'($urandom);
          if (int'(ecal[k]) + int'(hcal[k]) >= int'(tower_thr)) begin
            exp_t[i][k] = tower_et_t'(int'(ecal[k]) + int'(hcal[k]));
            es += ecal[k]; hs += hcal[k];
          end else begin
            exp_t[i][k] = '0;
            n_zeroed++;
          end
        end
        fg_in = 4'($urandom) & 4'($urandom);
        exp_fg[i] = fg_in != 0;
        exp_eg[i] = (es > 0) && (hs <= (es >> epim_shift));
        in_valid = 1;
      end else in_valid = 0;
      @(posedge clk); #1;
      if (i < NV)
        check(tower_et_s1 == exp_t[i], $sformatf("stage-1 towers %0d", i));
      if (i >= LAT - 1 && i - (LAT - 1) < NV) begin
        int j;
        j = i - (LAT - 1);
        check(out_valid, "out_valid");
        check(tower_et == exp_t[j], $sformatf("towers %0d", j));
        check(fg == exp_fg[j], $sformatf("fg %0d", j));
        if (j % 500 >= 3 && j % 500 < 497) check(egamma == exp_eg[j], $sformatf("egamma %0d", j));
        if (egamma) n_eg++;
        if (fg) n_fg++;
      end
    end
    @(posedge clk); #1;
    check(!out_valid, "out_valid after last");
    check(n_zeroed > 0 && n_eg > 0 && n_fg > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
