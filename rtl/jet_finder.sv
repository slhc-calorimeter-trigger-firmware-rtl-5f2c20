// jet_finder: jet reconstruction on an 8x8 lattice of filtered clusters.
//
// The lattice is split into an upper and lower half (rows 0-3 / 4-7) and a
// left and right half (columns 0-3 / 4-7). Four 16-input adder trees form
// the quadrant sums, which are shared to give the half sums U, D, L, R and
// the total ET. A jet is accepted when the lattice centre is a local maximum
// (central bit set) and both imbalances are small relative to ET:
//   |R - L| < ET >> RATIO_SHIFT  and  |U - D| < ET >> RATIO_SHIFT
// (RATIO_SHIFT = 3: 12.5 %). The output is ET for an accepted jet, else 0.
// The half sums, the shift-compare instead of a division and the final
// select between ET and 0 follow the original design; the quadrant split,
// the centre at lattice position (3,3) and the pipeline are this design's.
//
// Timing: 4 adder-tree levels, 1 cycle for the half sums and differences,
// 1 cycle for compare and select: jet_et follows the inputs by 6 cycles.
module jet_finder
  import calo_pkg::*;
#(
  parameter int unsigned RATIO_SHIFT = 3
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  input  logic                                     in_valid,
  input  cluster_et_t [LATTICE-1:0][LATTICE-1:0]   lattice,  // [row][col]
  input  logic                                     central,
  output logic [JET_ET_W-1:0]                      jet_et,
  output logic                                     out_valid
);
  localparam int unsigned H  = LATTICE / 2;
  localparam int unsigned QN = H * H;
  localparam int unsigned QW = CLUSTER_ET_W + $clog2(QN);

  // Quadrants 0 UL, 1 UR, 2 DL, 3 DR.
  logic [3:0][QN-1:0][CLUSTER_ET_W-1:0] qin;
  logic [3:0][QW-1:0]                   qsum;
  logic [3:0]                           qv;

  always_comb begin
    for (int r = 0; r < H; r++)
      for (int c = 0; c < H; c++) begin
        qin[0][r*H+c] = lattice[r][c];
        qin[1][r*H+c] = lattice[r][c+H];
        qin[2][r*H+c] = lattice[r+H][c];
        qin[3][r*H+c] = lattice[r+H][c+H];
      end
  end

  for (genvar q = 0; q < 4; q++) begin : g_quad
    adder_tree #(.N(QN), .IN_W(CLUSTER_ET_W), .PIPE(1'b1)) u_tree (
      .clk, .rst_n, .in_valid, .in(qin[q]), .sum(qsum[q]), .out_valid(qv[q])
    );
  end

  // Central bit delayed to line up with the tree outputs.
  localparam int unsigned TL = $clog2(QN);
  logic [TL-1:0] cen_d;
  always_ff @(posedge clk) cen_d <= TL'({cen_d, central});

  // Stage: half sums, differences, total.
  localparam int unsigned SW = QW + 1;
  logic [SW-1:0] l_c, r_c, u_c, d_c;
  always_comb begin
    l_c = SW'(qsum[0]) + SW'(qsum[2]);
    r_c = SW'(qsum[1]) + SW'(qsum[3]);
    u_c = SW'(qsum[0]) + SW'(qsum[1]);
    d_c = SW'(qsum[2]) + SW'(qsum[3]);
  end

  logic [SW-1:0]       rl5, ud5;
  logic [JET_ET_W-1:0] et5;
  logic                cen5, v5;
  always_ff @(posedge clk) begin
    rl5  <= (r_c >= l_c) ? r_c - l_c : l_c - r_c;
    ud5  <= (u_c >= d_c) ? u_c - d_c : d_c - u_c;
    et5  <= JET_ET_W'(l_c) + JET_ET_W'(r_c);
    cen5 <= cen_d[TL-1];
  end

  // Stage: compare and select.
  logic [JET_ET_W-1:0] lim;
  assign lim = et5 >> RATIO_SHIFT;
  always_ff @(posedge clk) begin
    jet_et <= (cen5 && JET_ET_W'(rl5) < lim && JET_ET_W'(ud5) < lim) ? et5 : '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v5 <= 1'b0; out_valid <= 1'b0;
    end else begin
      v5 <= qv[0]; out_valid <= v5;
    end
  end
endmodule
