// cluster_weighting: half-tower position of a 2x2 cluster.
//
// With towers E0 (top-left), E1 (top-right), E2 (bottom-left) and E3
// (bottom-right):
//   H = E1 + E3 - E0 - E2,  V = E2 + E3 - E0 - E1,  S = E0 + E1 + E2 + E3.
// H/S and V/S lie in [-1, 1]; each is placed in one of four half-tower bins
// [-1,-0.5), [-0.5,0), [0,0.5], (0.5,1] without division: the sign of H
// picks the half, and comparing 2|H| with S picks the quarter. This gives one
// of 16 points in the cluster.
//   hpos[1] = H >= 0
//   hpos[0] = H >= 0 ? (2|H| > S) : (2|H| <= S)
// so hpos counts 0..3 from left to right (vpos from top to bottom).
// The sums, the sign, the <<1 and the > compare follow the original design;
// the bit encoding of the bins is this design's choice.
//
// Timing: stage 1 adders, stage 2 compare; outputs 2 cycles after tower_et.
module cluster_weighting
  import calo_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  tower_et_t [3:0] tower_et,
  output logic [1:0]      hpos,
  output logic [1:0]      vpos,
  output logic            out_valid
);
  localparam int unsigned W = CLUSTER_ET_W + 1;

  logic signed [W-1:0] h_c, v_c;
  always_comb begin
    h_c = W'(tower_et[1]) + W'(tower_et[3]) - W'(tower_et[0]) - W'(tower_et[2]);
    v_c = W'(tower_et[2]) + W'(tower_et[3]) - W'(tower_et[0]) - W'(tower_et[1]);
  end

  logic              sh1, sv1, v1;
  cluster_et_t       habs1, vabs1, s1;
  always_ff @(posedge clk) begin
    sh1   <= h_c[W-1];
    sv1   <= v_c[W-1];
    habs1 <= cluster_et_t'(h_c[W-1] ? -h_c : h_c);
    vabs1 <= cluster_et_t'(v_c[W-1] ? -v_c : v_c);
    s1    <= cluster_et_t'(tower_et[0]) + cluster_et_t'(tower_et[1])
           + cluster_et_t'(tower_et[2]) + cluster_et_t'(tower_et[3]);
  end

  logic hbig, vbig;
  assign hbig = {habs1, 1'b0} > {1'b0, s1};
  assign vbig = {vabs1, 1'b0} > {1'b0, s1};

  always_ff @(posedge clk) begin
    hpos <= {~sh1, sh1 ^ hbig};
    vpos <= {~sv1, sv1 ^ vbig};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
    end
  end
endmodule
