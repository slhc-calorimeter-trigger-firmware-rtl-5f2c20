// cluster_grid: combined particle cluster finder, overlap filter and
// cluster weighting over a ROWS x COLS grid of 2x2 clusters.
//
// A cluster is formed at every tower position of a (ROWS+1) x (COLS+1)
// tower grid, so that neighbouring clusters overlap by one tower. Every
// cluster has its own finder, overlap filter and weighting unit (full
// replication); neighbouring overlap filters share their cluster sums.
// Stages:
//   1    tower filter (threshold)
//   2-5  cluster ECAL/HCAL sums, fine-grain OR, EPIM (finder, stages 2-4)
//   2-5  overlap filter (its own 4 stages, started from the filtered towers)
//   2-3  cluster weighting, then delayed to stage 5
//   6    pattern zeroing: a cluster whose pattern check failed is cleared
//   7    output register
// so clusters follows the tower grid by 7 cycles (35 ns at 200 MHz), as in
// the original design. Clusters on the edge of the grid see zero-ET
// neighbours outside it (this design's choice). The pattern check itself is
// not part of this block: its pass bit per cluster arrives with the towers.
module cluster_grid
  import calo_pkg::*;
#(
  parameter int unsigned ROWS = 8,
  parameter int unsigned COLS = 8
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  in_valid,
  input  logic [ROWS:0][COLS:0][ECAL_W-1:0]     ecal,
  input  logic [ROWS:0][COLS:0][HCAL_W-1:0]     hcal,
  input  logic [ROWS:0][COLS:0]                 fg,
  input  logic [ROWS-1:0][COLS-1:0]             pattern_pass,
  input  tower_et_t                             tower_thr,
  input  cluster_et_t                           cluster_thr,
  input  logic [2:0]                            epim_shift,
  output cluster_t [ROWS-1:0][COLS-1:0]         clusters,
  output logic                                  out_valid
);
  localparam int unsigned LATENCY = 7;

  cluster_et_t [ROWS-1:0][COLS-1:0] et_sum;   // overlap filter stage 1 sums

  // Shared sum of the cluster at (r, c), 0 outside the grid.
  function automatic cluster_et_t sum_at(cluster_et_t [ROWS-1:0][COLS-1:0] s, int r, int c);
    if (r < 0 || c < 0 || r >= int'(ROWS) || c >= int'(COLS)) return '0;
    return s[r][c];
  endfunction

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic [3:0][ECAL_W-1:0] e_in;
      logic [3:0][HCAL_W-1:0] h_in;
      logic [3:0]             fg_in;
      assign e_in  = {ecal[r+1][c+1], ecal[r+1][c], ecal[r][c+1], ecal[r][c]};
      assign h_in  = {hcal[r+1][c+1], hcal[r+1][c], hcal[r][c+1], hcal[r][c]};
      assign fg_in = {fg[r+1][c+1], fg[r+1][c], fg[r][c+1], fg[r][c]};

      tower_et_t [3:0] t_s1;
      logic            egamma4, fg4;

      particle_cluster_finder u_pcf (
        .clk, .rst_n, .in_valid, .ecal(e_in), .hcal(h_in), .fg_in,
        .tower_thr, .epim_shift, .tower_et_s1(t_s1), .tower_et(),
        .egamma(egamma4), .fg(fg4), .out_valid()
      );

      cluster_et_t [7:0] nbr;
      always_comb begin
        nbr[NB_NW] = sum_at(et_sum, r-1, c-1);
        nbr[NB_N]  = sum_at(et_sum, r-1, c);
        nbr[NB_NE] = sum_at(et_sum, r-1, c+1);
        nbr[NB_W]  = sum_at(et_sum, r,   c-1);
        nbr[NB_E]  = sum_at(et_sum, r,   c+1);
        nbr[NB_SW] = sum_at(et_sum, r+1, c-1);
        nbr[NB_S]  = sum_at(et_sum, r+1, c);
        nbr[NB_SE] = sum_at(et_sum, r+1, c+1);
      end

      cluster_et_t et5;
      logic        central5;
      cluster_overlap_filter u_cof (
        .clk, .rst_n, .in_valid(1'b0), .tower_et(t_s1), .et_sum(et_sum[r][c]),
        .nbr_et(nbr), .cluster_thr, .mask(), .central(central5), .et(et5),
        .out_valid()
      );

      logic [1:0] hpos3, vpos3;
      cluster_weighting u_cw (
        .clk, .rst_n, .in_valid(1'b0), .tower_et(t_s1), .hpos(hpos3), .vpos(vpos3),
        .out_valid()
      );

      // Alignment to stage 5.
      logic [1:0] hpos4, vpos4, hpos5, vpos5;
      logic       egamma5, fg5;
      logic [4:0] pass_d;
      always_ff @(posedge clk) begin
        hpos4   <= hpos3;  vpos4 <= vpos3;
        hpos5   <= hpos4;  vpos5 <= vpos4;
        egamma5 <= egamma4;
        fg5     <= fg4;
        pass_d  <= {pass_d[3:0], pattern_pass[r][c]};
      end

      // Stage 6: pattern zeroing. Stage 7: output register.
      cluster_t rec6;
      always_ff @(posedge clk) begin
        if (pass_d[4])
          rec6 <= '{central: central5, egamma: egamma5, fg: fg5,
                    hpos: hpos5, vpos: vpos5, et: et5};
        else
          rec6 <= '0;
        clusters[r][c] <= rec6;
      end
    end
  end

  logic [LATENCY-1:0] v;
  always_ff @(posedge clk) begin
    if (!rst_n) v <= '0;
    else        v <= {v[LATENCY-2:0], in_valid};
  end
  assign out_valid = v[LATENCY-1];
endmodule
