// epim: electron/photon identification of one cluster.
//
// The cluster is called electron/photon-like when it has ECAL energy and its
// HCAL sum is at most its ECAL sum scaled down by 2^ratio_shift (with
// ratio_shift = 3: H <= E/8). The original design only names this unit and
// places it in two pipeline stages; the criterion is this design's choice,
// written without division as a shift and compare.
//
// Timing: egamma follows ecal_sum/hcal_sum by two clock cycles; in_valid is
// carried alongside as out_valid.
module epim
  import calo_pkg::*;
#(
  parameter int unsigned SUM_W = CSUM_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [SUM_W-1:0] ecal_sum,
  input  logic [SUM_W-1:0] hcal_sum,
  input  logic [2:0]       ratio_shift,
  output logic             egamma,
  output logic             out_valid
);
  logic [SUM_W-1:0] limit_q, hcal_q;
  logic             has_e_q, v_q;

  // Stage 1: scaled ECAL limit.
  always_ff @(posedge clk) begin
    limit_q <= ecal_sum >> ratio_shift;
    hcal_q  <= hcal_sum;
    has_e_q <= |ecal_sum;
  end

  // Stage 2: compare.
  always_ff @(posedge clk) begin
    egamma <= has_e_q && (hcal_q <= limit_q);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q       <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v_q       <= in_valid;
      out_valid <= v_q;
    end
  end
endmodule
