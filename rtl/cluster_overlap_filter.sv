// cluster_overlap_filter: overlap filter for one 2x2 cluster.
//
// Neighbouring clusters share towers (one tower with a diagonal neighbour,
// two with an edge neighbour). The cluster's ET is compared with the ET of
// each of its 8 neighbours; where a neighbour is more energetic, the towers
// the two share are marked in a 4-bit pruning mask. The unmasked towers are
// summed again, the cluster threshold is applied, and the central bit is set
// when no tower was pruned (the cluster is a local maximum).
//
// Stage 1: own cluster ET (et_sum, also given to the 8 neighbours).
// Stage 2: 8 comparators -> 4-bit masks -> pruning mask generator (OR).
// Stage 3: tower pruning and re-summation.
// Stage 4: cluster threshold, central bit = NOR of the mask.
// Outputs follow tower_et by 4 cycles, as in the original design.
// nbr_et must be the neighbours' et_sum outputs from the same cycle (order
// NW, N, NE, W, E, SW, S, SE; 0 for a neighbour outside the grid).
//
// Own choices: ties are broken by direction so that of two equal
// neighbours exactly one is pruned (a neighbour to the W, NW, N or NE must be
// strictly greater, one to the E, SW, S or SE greater or equal); the
// threshold keeps ET >= cluster_thr; the neighbours' sums are shared rather
// than recomputed in each filter.
module cluster_overlap_filter
  import calo_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  tower_et_t [3:0]       tower_et,
  output cluster_et_t           et_sum,
  input  cluster_et_t [7:0]     nbr_et,
  input  cluster_et_t           cluster_thr,
  output logic [3:0]            mask,
  output logic                  central,
  output cluster_et_t           et,
  output logic                  out_valid
);
  // Towers shared with the neighbour in each direction (bit i = tower i).
  localparam logic [7:0][3:0] OVERLAP = {
    4'b1000,  // SE
    4'b1100,  // S
    4'b0100,  // SW
    4'b1010,  // E
    4'b0101,  // W
    4'b0010,  // NE
    4'b0011,  // N
    4'b0001   // NW
  };
  // Neighbours that also prune on equal ET.
  localparam logic [7:0] PRUNE_ON_TIE = 8'b1111_0000;  // E, SW, S, SE

  // Stage 1
  tower_et_t [3:0] t1;
  always_ff @(posedge clk) begin
    et_sum <= cluster_et_t'(tower_et[0]) + cluster_et_t'(tower_et[1])
            + cluster_et_t'(tower_et[2]) + cluster_et_t'(tower_et[3]);
    t1     <= tower_et;
  end

  // Stage 2
  logic [3:0]      mask_c, m2;
  tower_et_t [3:0] t2;
  always_comb begin
    mask_c = '0;
    for (int n = 0; n < 8; n++) begin
      if (nbr_et[n] > et_sum || (PRUNE_ON_TIE[n] && nbr_et[n] == et_sum))
        mask_c |= OVERLAP[n];
    end
  end
  always_ff @(posedge clk) begin
    m2 <= mask_c;
    t2 <= t1;
  end

  // Stage 3
  cluster_et_t psum3;
  logic [3:0]  m3;
  always_ff @(posedge clk) begin
    psum3 <= (m2[0] ? '0 : cluster_et_t'(t2[0])) + (m2[1] ? '0 : cluster_et_t'(t2[1]))
           + (m2[2] ? '0 : cluster_et_t'(t2[2])) + (m2[3] ? '0 : cluster_et_t'(t2[3]));
    m3    <= m2;
  end

  // Stage 4
  always_ff @(posedge clk) begin
    et      <= (psum3 >= cluster_thr) ? psum3 : '0;
    central <= ~|m3;
    mask    <= m3;
  end

  logic [2:0] v;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v         <= '0;
      out_valid <= 1'b0;
    end else begin
      v         <= {v[1:0], in_valid};
      out_valid <= v[2];
    end
  end
endmodule
