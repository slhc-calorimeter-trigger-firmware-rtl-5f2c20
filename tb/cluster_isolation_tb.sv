// Testbench for cluster_isolation: random central and neighbour ETs and
// random coefficients; the electron and tau isolation bits must equal
// (count of neighbours with ET > threshold) < A + B*ET + C*ET^2, three
// cycles after the inputs. Coefficients and thresholds change with each
// input here, so they are held in the reference for the cycle they apply.
module cluster_isolation_tb;
  import calo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               in_valid, iso_e, iso_tau, out_valid;
  cluster_et_t        central_et;
  cluster_et_t [62:0] nbr_et;
  calo_cfg_t          cfg;

  cluster_isolation dut (.*);

  localparam int LAT = 3, NV = 3000;
  int checks = 0, failures = 0, n_iso = 0, n_non = 0;
  bit exp_e [NV], exp_t [NV];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; central_et = '0; nbr_et = '0; cfg = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // Configuration held constant: the coefficients are read in stage 2.
    cfg.e_thr = 11'd20;  cfg.tau_thr = 11'd40;
    cfg.e_a = 8'd2;  cfg.e_b = 8'd0;  cfg.e_c = 8'd0;
    cfg.tau_a = 8'd1; cfg.tau_b = 8'd1; cfg.tau_c = 8'd0;
    for (int i = 0; i < NV + LAT; i++) begin
      if (i < NV) begin
        longint ce, le, lt;
        int cnt_e, cnt_t;
        if (i == NV / 2) begin  // second half: quadratic term in use
          cfg.e_a = 8'd3; cfg.e_b = 8'd0; cfg.e_c = 8'd1;
          cfg.tau_a = 8'd0; cfg.tau_b = 8'd2; cfg.tau_c = 8'd0;
        end
        central_et = cluster_et_t'($urandom % 12);
        cnt_e = 0; cnt_t = 0;
        for (int k = 0; k < 63; k++) begin
          nbr_et[k] = ($urandom % 16 == 0) ? cluster_et_t'($urandom % 80) : cluster_et_t'($urandom % 25);
          if (nbr_et[k] > cfg.e_thr) cnt_e++;
          if (nbr_et[k] > cfg.tau_thr) cnt_t++;
        end
        ce = central_et;
        le = cfg.e_a + cfg.e_b * ce + cfg.e_c * ce * ce;
        lt = cfg.tau_a + cfg.tau_b * ce + cfg.tau_c * ce * ce;
        exp_e[i] = cnt_e < le;
        exp_t[i] = cnt_t < lt;
      end
      in_valid = i < NV;
      @(posedge clk); #1;
      if (i >= LAT - 1 && i - (LAT - 1) < NV) begin
        int j;
        j = i - (LAT - 1);
        if (j < NV / 2 - 2 || j >= NV / 2 + 2) begin
          checks++;
          if (iso_e != exp_e[j] || iso_tau != exp_t[j] || !out_valid) begin
            failures++;
            $display("FAIL %0d: e=%b/%b tau=%b/%b", j, iso_e, exp_e[j], iso_tau, exp_t[j]);
          end
          if (iso_e) n_iso++; else n_non++;
        end
      end
    end
    checks++;
    if (n_iso == 0 || n_non == 0) failures++;
    $display("isolated=%0d not=%0d", n_iso, n_non);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
