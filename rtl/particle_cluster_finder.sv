// particle_cluster_finder: one 2x2 cluster of the particle cluster finder.
//
// Stage 1 (tower filter): each tower whose E+H is below tower_thr is zeroed;
//   the thresholded E+H of the four towers is also presented on tower_et_s1
//   so that the overlap filter and the weighting can start in parallel.
// Stage 2: cluster ECAL sum, cluster HCAL sum, per-tower E+H, OR of the four
//   fine-grain bits.
// Stages 3-4: the EPIM turns the ECAL/HCAL sums into the e/gamma bit.
// Outputs tower_et, egamma and fg are valid 4 cycles after the inputs, as in
// the original design (latency four cycles). Tower order: 0 top-left,
// 1 top-right, 2 bottom-left, 3 bottom-right.
//
// The structure (per-tower comparator and zeroing mux, ECAL and HCAL cluster
// adders feeding the EPIM, per-tower E+H adders, fine-grain OR) follows the
// original design. Own choices: the threshold is applied to E+H with >=, the
// fine-grain OR uses the unthresholded bits, thresholds are run-time inputs.
module particle_cluster_finder
  import calo_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [3:0][ECAL_W-1:0] ecal,
  input  logic [3:0][HCAL_W-1:0] hcal,
  input  logic [3:0]             fg_in,
  input  tower_et_t              tower_thr,
  input  logic [2:0]             epim_shift,
  output tower_et_t [3:0]        tower_et_s1,
  output tower_et_t [3:0]        tower_et,
  output logic                   egamma,
  output logic                   fg,
  output logic                   out_valid
);
  // Stage 1: threshold towers.
  logic [3:0][ECAL_W-1:0] e1;
  logic [3:0][HCAL_W-1:0] h1;
  logic [3:0]             fg1;
  logic                   v1;

  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      tower_et_t eh;
      eh = tower_et_t'(ecal[i]) + tower_et_t'(hcal[i]);
      if (eh >= tower_thr) begin
        e1[i]          <= ecal[i];
        h1[i]          <= hcal[i];
        tower_et_s1[i] <= eh;
      end else begin
        e1[i]          <= '0;
        h1[i]          <= '0;
        tower_et_s1[i] <= '0;
      end
    end
    fg1 <= fg_in;
  end

  // Stage 2: cluster sums, tower E+H, fine-grain OR.
  logic [CSUM_W-1:0] esum2, hsum2;
  tower_et_t [3:0]   t2;
  logic              fg2, v2;

  always_ff @(posedge clk) begin
    esum2 <= CSUM_W'(e1[0]) + CSUM_W'(e1[1]) + CSUM_W'(e1[2]) + CSUM_W'(e1[3]);
    hsum2 <= CSUM_W'(h1[0]) + CSUM_W'(h1[1]) + CSUM_W'(h1[2]) + CSUM_W'(h1[3]);
    for (int i = 0; i < 4; i++) t2[i] <= tower_et_t'(e1[i]) + tower_et_t'(h1[i]);
    fg2 <= |fg1;
  end

  // Stages 3-4: EPIM, with tower ET and fine-grain bit delayed alongside.
  tower_et_t [3:0] t3;
  logic            fg3;

  epim #(.SUM_W(CSUM_W)) u_epim (
    .clk, .rst_n, .in_valid(v2), .ecal_sum(esum2), .hcal_sum(hsum2),
    .ratio_shift(epim_shift), .egamma, .out_valid
  );

  always_ff @(posedge clk) begin
    t3       <= t2;
    fg3      <= fg2;
    tower_et <= t3;
    fg       <= fg3;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
    end
  end
endmodule
