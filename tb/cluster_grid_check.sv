// cluster_grid_check: self-checking run of cluster_grid at size R x C.
// A new random event
// (background plus a few energetic deposits, some duplicated to force equal
// neighbours) enters every cycle; every cluster record must equal the
// reference model's exactly 7 cycles later. Counts how often towers are
// zeroed, clusters pruned, kept as local maxima, cut by the cluster
// threshold, marked e/gamma or fine-grain, and zeroed by the pattern bit.
// The default size (8x8) leaves the block's parameters alone. Reports its
// totals on checks/failures and raises done; the caller prints the result.
module cluster_grid_check #(
  parameter int R = 8,
  parameter int C = 8,
  parameter int NV = 150
) (
  output bit done,
  output int checks,
  output int failures
);
  import calo_pkg::*;
  import calo_ref_pkg::*;
  localparam int LAT = 7;
  localparam int TTHR = 4, CTHR = 12, ESH = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                        in_valid, out_valid;
  logic [R:0][C:0][7:0]        ecal, hcal;
  logic [R:0][C:0]             fg;
  logic [R-1:0][C-1:0]         pattern_pass;
  cluster_t [R-1:0][C-1:0]     clusters;

  if (R == 8 && C == 8) begin : g_default
    cluster_grid dut (.clk, .rst_n, .in_valid, .ecal, .hcal, .fg, .pattern_pass,
                    .tower_thr(9'(TTHR)), .cluster_thr(11'(CTHR)), .epim_shift(3'(ESH)),
                    .clusters, .out_valid);
  end else begin : g_sized
    cluster_grid #(.ROWS(R), .COLS(C)) dut (.clk, .rst_n, .in_valid, .ecal, .hcal, .fg, .pattern_pass,
                    .tower_thr(9'(TTHR)), .cluster_thr(11'(CTHR)), .epim_shift(3'(ESH)),
                    .clusters, .out_valid);
  end

  int n_central = 0, n_pruned = 0, n_eg = 0, n_fg = 0, n_pat = 0, n_cut = 0;
  cluster_t exp_q [NV][R][C];

  initial begin
    done = 0; checks = 0; failures = 0;
  end

  initial begin
    grid_in_t g;
    #1;
    in_valid = 0; ecal = '0; hcal = '0; fg = '0; pattern_pass = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < NV + LAT; i++) begin
      if (i < NV) begin
        random_event(g, R, C, i);
        for (int r = 0; r <= R; r++)
          for (int c = 0; c <= C; c++) begin
            ecal[r][c] = 8'(g.e[r][c]); hcal[r][c] = 8'(g.h[r][c]); fg[r][c] = g.fg[r][c];
          end
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++) begin
            pattern_pass[r][c] = g.pass[r][c];
            exp_q[i][r][c] = cluster_ref(g, R, C, r, c, TTHR, CTHR, ESH);
            if (!g.pass[r][c]) n_pat++;
            else begin
              int own;
              own = raw_sum(g, R, C, r, c, TTHR);
              if (exp_q[i][r][c].central) n_central++; else n_pruned++;
              if (exp_q[i][r][c].et == 0 && own > 0) n_cut++;
            end
          end
      end
      in_valid = i < NV;
      @(posedge clk); #1;
      if (i >= LAT - 1 && i - (LAT - 1) < NV) begin
        int j;
        j = i - (LAT - 1);
        checks++;
        if (!out_valid) begin failures++; $display("FAIL: out_valid low at event %0d", j); end
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++) begin
            checks++;
            if (clusters[r][c] != exp_q[j][r][c]) begin
              failures++;
              if (failures < 10)
                $display("FAIL event %0d cluster (%0d,%0d): %h exp %h", j, r, c, clusters[r][c], exp_q[j][r][c]);
            end
            if (clusters[r][c].egamma) n_eg++;
            if (clusters[r][c].fg) n_fg++;
          end
      end else if (i < LAT - 1) begin
        checks++;
        if (out_valid) begin failures++; $display("FAIL: out_valid early"); end
      end
    end
    $display("central=%0d pruned=%0d below-cluster-threshold=%0d egamma=%0d fg=%0d pattern-zeroed=%0d",
             n_central, n_pruned, n_cut, n_eg, n_fg, n_pat);
    checks++;
    if (n_central == 0 || n_pruned == 0 || n_cut == 0 || n_eg == 0 || n_fg == 0 || n_pat == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    $display("%0dx%0d grid: checks=%0d failures=%0d", R, C, checks, failures);
    done = 1;
  end
endmodule
