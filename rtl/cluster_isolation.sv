// cluster_isolation: electron and tau isolation of one cluster.
//
// The cluster sits in an 8x8 lattice of filtered clusters; its 63
// neighbours each pass two threshold units (ET > e_thr, ET > tau_thr). Two
// adders count the neighbours above each threshold, and the cluster is
// isolated when the count is below a quadratic function of its own ET:
//   iso = count < A + B*ET + C*ET^2
// with separate A, B, C for electrons and taus. Threshold units, the two
// counting adders, the isolation units and the quadratic limit follow the
// original design; of the two approaches it considers (a lookup on a
// compressed ET, or the quadratic) the quadratic is built here, and the
// 3-cycle pipeline is this design's choice.
//
// Timing: stage 1 thresholds and ET^2, stage 2 counts and limits,
// stage 3 compare; iso_e/iso_tau follow the inputs by 3 cycles.
module cluster_isolation
  import calo_pkg::*;
#(
  parameter int unsigned N_NBR = LATTICE * LATTICE - 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  cluster_et_t             central_et,
  input  cluster_et_t [N_NBR-1:0] nbr_et,
  input  calo_cfg_t               cfg,
  output logic                    iso_e,
  output logic                    iso_tau,
  output logic                    out_valid
);
  localparam int unsigned CNT_W = $clog2(N_NBR) + 1;
  localparam int unsigned LIM_W = 2 * CLUSTER_ET_W + 10;

  // Stage 1: threshold units and ET products.
  logic [N_NBR-1:0][0:0] above_e, above_tau;
  logic [LIM_W-1:0]      et1, et_sq1;
  logic                  v1;
  always_ff @(posedge clk) begin
    for (int i = 0; i < N_NBR; i++) begin
      above_e[i]   <= nbr_et[i] > cfg.e_thr;
      above_tau[i] <= nbr_et[i] > cfg.tau_thr;
    end
    et1    <= LIM_W'(central_et);
    et_sq1 <= LIM_W'(central_et) * LIM_W'(central_et);
  end

  // Stage 2: electron and tau adders, quadratic limits.
  logic [CNT_W-1:0] cnt_e_c, cnt_tau_c;
  logic [CNT_W-1:0] cnt_e2, cnt_tau2;
  logic [LIM_W-1:0] lim_e2, lim_tau2;
  logic             v2;

  adder_tree #(.N(N_NBR), .IN_W(1), .PIPE(1'b0)) u_e_adder (
    .clk, .rst_n, .in_valid(1'b0), .in(above_e), .sum(cnt_e_c), .out_valid()
  );
  adder_tree #(.N(N_NBR), .IN_W(1), .PIPE(1'b0)) u_tau_adder (
    .clk, .rst_n, .in_valid(1'b0), .in(above_tau), .sum(cnt_tau_c), .out_valid()
  );

  always_ff @(posedge clk) begin
    cnt_e2   <= cnt_e_c;
    cnt_tau2 <= cnt_tau_c;
    lim_e2   <= LIM_W'(cfg.e_a) + LIM_W'(cfg.e_b) * et1 + LIM_W'(cfg.e_c) * et_sq1;
    lim_tau2 <= LIM_W'(cfg.tau_a) + LIM_W'(cfg.tau_b) * et1 + LIM_W'(cfg.tau_c) * et_sq1;
  end

  // Stage 3: isolation units.
  always_ff @(posedge clk) begin
    iso_e   <= LIM_W'(cnt_e2) < lim_e2;
    iso_tau <= LIM_W'(cnt_tau2) < lim_tau2;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
    end else begin
      v1 <= in_valid; v2 <= v1; out_valid <= v2;
    end
  end
endmodule
