// calo_trigger_top: calorimeter trigger card for a GRID_ROWS x GRID_COLS
// grid of 2x2 tower clusters.
//
// Data flow:
//  1. Tower input buffers. The (GRID_ROWS+1) x (GRID_COLS+1) towers arrive
//     over N_TILES transceiver dual tiles, 15 towers per tile (for 8x8:
//     ceil(81/15) = 6 tiles, 12 links). Towers are assigned to tiles in
//     row-major order, tower t = row*(GRID_COLS+1)+col in slot t%15 of tile
//     t/15 (this design's choice). lane_data carries the 16-bit parallel
//     words of every link; lane_valid/lane_sof are common to all links.
//  2. cluster_grid: tower threshold, cluster sums, e/gamma ID, fine-grain OR,
//     overlap filter with central (local maximum) bit, half-tower position,
//     pattern zeroing; 7 cycles after the frame is complete.
//  3. Per cluster, on the 8x8 lattice of clusters at rows r-3..r+4 and
//     columns c-3..c+4 (zero outside the grid): cluster_isolation (3 cycles,
//     delayed to 6) and jet_finder (6 cycles).
//  4. Candidates: an electron is a central, e/gamma, electron-isolated
//     cluster; a tau a central, tau-isolated cluster; the sort key is the
//     cluster ET (0 if not a candidate). Jets use the jet sum. One n-to-4
//     bitonic sorter per kind returns the four largest with their cluster
//     index r*GRID_COLS+c (the candidate rules are this design's choice).
//
// Timing (cycles of clk after the frame_valid of the input buffers):
//   clusters/clusters_valid  +7
//   iso_e, iso_tau, jet_et, obj_valid  +13
//   top_* , sort_valid       +14 + sorter stages (3*log2(N)-5; 13 for 64)
// pattern_pass is sampled with word 0 (lane_sof) of each frame. The
// original design clocks the input registers at 320 MHz, the frame at 40
// MHz and the logic at 200 MHz; here one clock runs everything. The
// pattern check and the output links are not part of this design: their
// signals are ports.
module calo_trigger_top
  import calo_pkg::*;
#(
  parameter int unsigned GRID_ROWS = 8,
  parameter int unsigned GRID_COLS = 8,
  localparam int unsigned N_TOWERS_GRID = (GRID_ROWS + 1) * (GRID_COLS + 1),
  localparam int unsigned N_TILES       = (N_TOWERS_GRID + 14) / 15,
  localparam int unsigned N_CL          = GRID_ROWS * GRID_COLS,
  localparam int unsigned SORT_N        = (N_CL <= 8) ? 8 : (1 << $clog2(N_CL)),
  localparam int unsigned TAG_W         = $clog2(SORT_N)
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic [N_TILES-1:0][1:0][15:0]           lane_data,
  input  logic                                    lane_valid,
  input  logic                                    lane_sof,
  input  logic [GRID_ROWS-1:0][GRID_COLS-1:0]     pattern_pass,
  input  calo_cfg_t                               cfg,
  output cluster_t [GRID_ROWS-1:0][GRID_COLS-1:0] clusters,
  output logic                                    clusters_valid,
  output logic [GRID_ROWS-1:0][GRID_COLS-1:0]     iso_e,
  output logic [GRID_ROWS-1:0][GRID_COLS-1:0]     iso_tau,
  output logic [GRID_ROWS-1:0][GRID_COLS-1:0][JET_ET_W-1:0] jet_et,
  output logic                                    obj_valid,
  output cluster_et_t [3:0]                       top_e_key,
  output logic [3:0][TAG_W-1:0]                   top_e_tag,
  output cluster_et_t [3:0]                       top_tau_key,
  output logic [3:0][TAG_W-1:0]                   top_tau_tag,
  output logic [3:0][JET_ET_W-1:0]                top_jet_key,
  output logic [3:0][TAG_W-1:0]                   top_jet_tag,
  output logic                                    sort_valid
);
  localparam int unsigned LH = LATTICE / 2;  // lattice rows above/left of centre: LH-1

  // ---------------------------------------------------------------- input
  logic [N_TILES-1:0][14:0][15:0] tile_towers;
  logic [N_TILES-1:0][14:0]       tile_fg;
  logic [N_TILES-1:0]             tile_valid;

  for (genvar t = 0; t < N_TILES; t++) begin : g_tile
    tower_input_buffer u_buf (
      .clk, .rst_n, .lane_data(lane_data[t]), .lane_valid, .lane_sof,
      .towers(tile_towers[t]), .fg(tile_fg[t]), .frame_valid(tile_valid[t])
    );
  end

  logic [GRID_ROWS:0][GRID_COLS:0][ECAL_W-1:0] ecal;
  logic [GRID_ROWS:0][GRID_COLS:0][HCAL_W-1:0] hcal;
  logic [GRID_ROWS:0][GRID_COLS:0]             fg;
  always_comb begin
    for (int r = 0; r <= GRID_ROWS; r++)
      for (int c = 0; c <= GRID_COLS; c++) begin
        int t;
        t = r * (GRID_COLS + 1) + c;
        ecal[r][c] = tile_towers[t / 15][t % 15][7:0];
        hcal[r][c] = tile_towers[t / 15][t % 15][15:8];
        fg[r][c]   = tile_fg[t / 15][t % 15];
      end
  end

  logic [GRID_ROWS-1:0][GRID_COLS-1:0] pass_q;
  always_ff @(posedge clk) begin
    if (lane_valid && lane_sof) pass_q <= pattern_pass;
  end

  // ---------------------------------------------------------------- clusters
  cluster_grid #(.ROWS(GRID_ROWS), .COLS(GRID_COLS)) u_grid (
    .clk, .rst_n, .in_valid(tile_valid[0]), .ecal, .hcal, .fg,
    .pattern_pass(pass_q), .tower_thr(cfg.tower_thr), .cluster_thr(cfg.cluster_thr),
    .epim_shift(cfg.epim_shift), .clusters, .out_valid(clusters_valid)
  );

  function automatic cluster_et_t et_at(cluster_t [GRID_ROWS-1:0][GRID_COLS-1:0] cl, int r, int c);
    if (r < 0 || c < 0 || r >= int'(GRID_ROWS) || c >= int'(GRID_COLS)) return '0;
    return cl[r][c].et;
  endfunction

  // ------------------------------------------------- isolation and jets
  logic [GRID_ROWS-1:0][GRID_COLS-1:0] jet_v;
  logic [GRID_ROWS-1:0][GRID_COLS-1:0] e_cand, tau_cand;
  cluster_et_t [GRID_ROWS-1:0][GRID_COLS-1:0] cand_et;

  for (genvar r = 0; r < GRID_ROWS; r++) begin : g_row
    for (genvar c = 0; c < GRID_COLS; c++) begin : g_col
      cluster_et_t [LATTICE-1:0][LATTICE-1:0] lat;
      cluster_et_t [LATTICE*LATTICE-2:0]      nbr;
      always_comb begin
        int k;
        k = 0;
        nbr = '0;
        for (int i = 0; i < LATTICE; i++)
          for (int j = 0; j < LATTICE; j++) begin
            lat[i][j] = et_at(clusters, r + i - (LH - 1), c + j - (LH - 1));
            if (!(i == LH - 1 && j == LH - 1)) begin
              nbr[k] = lat[i][j];
              k++;
            end
          end
      end

      logic iso_e3, iso_tau3;
      cluster_isolation u_iso (
        .clk, .rst_n, .in_valid(1'b0), .central_et(clusters[r][c].et), .nbr_et(nbr),
        .cfg, .iso_e(iso_e3), .iso_tau(iso_tau3), .out_valid()
      );

      jet_finder u_jet (
        .clk, .rst_n, .in_valid(clusters_valid), .lattice(lat),
        .central(clusters[r][c].central), .jet_et(jet_et[r][c]), .out_valid(jet_v[r][c])
      );

      // Align isolation (3 cycles) and the cluster record with the jets (6).
      logic [2:0] iso_e_d, iso_tau_d;
      cluster_t [5:0] rec_d;
      always_ff @(posedge clk) begin
        iso_e_d   <= {iso_e_d[1:0], iso_e3};
        iso_tau_d <= {iso_tau_d[1:0], iso_tau3};
        rec_d     <= {rec_d[4:0], clusters[r][c]};
      end
      assign iso_e[r][c]    = iso_e_d[2];
      assign iso_tau[r][c]  = iso_tau_d[2];
      assign e_cand[r][c]   = rec_d[5].central && rec_d[5].egamma && iso_e_d[2];
      assign tau_cand[r][c] = rec_d[5].central && iso_tau_d[2];
      assign cand_et[r][c]  = rec_d[5].et;
    end
  end
  assign obj_valid = jet_v[0][0];

  // ---------------------------------------------------------------- sorting
  cluster_et_t [SORT_N-1:0]           e_key, tau_key;
  logic [SORT_N-1:0][JET_ET_W-1:0]    jet_key;
  logic [SORT_N-1:0][TAG_W-1:0]       tag;
  logic                               key_v;
  always_ff @(posedge clk) begin
    for (int i = 0; i < SORT_N; i++) begin
      if (i < N_CL) begin
        e_key[i]   <= e_cand[i / GRID_COLS][i % GRID_COLS]   ? cand_et[i / GRID_COLS][i % GRID_COLS] : '0;
        tau_key[i] <= tau_cand[i / GRID_COLS][i % GRID_COLS] ? cand_et[i / GRID_COLS][i % GRID_COLS] : '0;
        jet_key[i] <= jet_et[i / GRID_COLS][i % GRID_COLS];
      end else begin
        e_key[i]   <= '0;
        tau_key[i] <= '0;
        jet_key[i] <= '0;
      end
    end
  end
  always_comb begin
    for (int i = 0; i < SORT_N; i++) tag[i] = TAG_W'(i);
  end
  always_ff @(posedge clk) begin
    if (!rst_n) key_v <= 1'b0;
    else        key_v <= obj_valid;
  end

  bitonic_sorter_n4 #(.N(SORT_N), .KEY_W(CLUSTER_ET_W), .TAG_W(TAG_W)) u_sort_e (
    .clk, .rst_n, .in_valid(key_v), .in_key(e_key), .in_tag(tag),
    .out_key(top_e_key), .out_tag(top_e_tag), .out_valid(sort_valid)
  );
  bitonic_sorter_n4 #(.N(SORT_N), .KEY_W(CLUSTER_ET_W), .TAG_W(TAG_W)) u_sort_tau (
    .clk, .rst_n, .in_valid(key_v), .in_key(tau_key), .in_tag(tag),
    .out_key(top_tau_key), .out_tag(top_tau_tag), .out_valid()
  );
  bitonic_sorter_n4 #(.N(SORT_N), .KEY_W(JET_ET_W), .TAG_W(TAG_W)) u_sort_jet (
    .clk, .rst_n, .in_valid(key_v), .in_key(jet_key), .in_tag(tag),
    .out_key(top_jet_key), .out_tag(top_jet_tag), .out_valid()
  );
endmodule
