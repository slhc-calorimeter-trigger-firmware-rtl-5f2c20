// calo_pkg: widths, record types and run-time configuration shared by the
// calorimeter trigger blocks.
//
// A tower arrives as a 16-bit word, ECAL transverse energy in bits 7:0 and
// HCAL in bits 15:8, plus one ECAL fine-grain bit. The tower energy used by
// the clustering logic is E+H, 9 bits wide, so that the four towers of a
// 2x2 cluster make a 36-bit bundle and a cluster sum fits in 11 bits. The
// 9-bit tower sum, the 36-bit bundle and the 11-bit cluster ET follow the
// original design; the 8+8 split of the tower word is this design's choice.
package calo_pkg;

  localparam int unsigned ECAL_W       = 8;
  localparam int unsigned HCAL_W       = 8;
  localparam int unsigned TOWER_ET_W   = 9;   // E + H of one tower
  localparam int unsigned CLUSTER_ET_W = 11;  // sum of four towers
  localparam int unsigned CSUM_W       = 10;  // sum of four ECAL (or HCAL) values
  localparam int unsigned LATTICE      = 8;   // isolation / jet lattice edge, in clusters
  localparam int unsigned JET_ET_W     = CLUSTER_ET_W + 6;  // 64 clusters

  typedef logic [TOWER_ET_W-1:0]   tower_et_t;
  typedef logic [CLUSTER_ET_W-1:0] cluster_et_t;

  // Neighbour order used by the overlap filter and the cluster grid.
  typedef enum logic [2:0] {
    NB_NW = 3'd0, NB_N = 3'd1, NB_NE = 3'd2, NB_W = 3'd3,
    NB_E  = 3'd4, NB_SW = 3'd5, NB_S = 3'd6, NB_SE = 3'd7
  } nbr_e;

  // One cluster as it leaves the 7-stage cluster pipeline.
  typedef struct packed {
    logic        central;  // local maximum: no tower was pruned
    logic        egamma;   // electron/photon-like
    logic        fg;       // OR of the fine-grain bits
    logic [1:0]  hpos;     // horizontal half-tower position
    logic [1:0]  vpos;     // vertical half-tower position
    cluster_et_t et;       // pruned, thresholded cluster ET
  } cluster_t;

  // Run-time thresholds and coefficients.
  typedef struct packed {
    tower_et_t   tower_thr;    // tower kept when E+H >= tower_thr
    cluster_et_t cluster_thr;  // cluster kept when ET >= cluster_thr
    logic [2:0]  epim_shift;   // e/gamma when HCAL <= ECAL >> epim_shift
    cluster_et_t e_thr;        // neighbour counted for electron isolation when ET > e_thr
    cluster_et_t tau_thr;      // neighbour counted for tau isolation when ET > tau_thr
    logic [7:0]  e_a, e_b, e_c;       // electron: isolated when count < A + B*ET + C*ET^2
    logic [7:0]  tau_a, tau_b, tau_c; // tau: same form
  } calo_cfg_t;

endpackage
