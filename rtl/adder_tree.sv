// adder_tree: binary adder tree with logarithmic depth.
//
// N operands of IN_W bits are added pairwise, level by level, in
// ceil(log2 N) levels (missing operands of a non-power-of-two N read as 0).
// With PIPE = 1 every level is registered and sum follows in by
// ceil(log2 N) cycles; with PIPE = 0 the tree is purely combinational. The
// tree shape follows the original design; the register placement is a
// parameter of this design.
module adder_tree #(
  parameter int unsigned N    = 64,
  parameter int unsigned IN_W = 11,
  parameter bit          PIPE = 1'b1,
  localparam int unsigned L    = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned OUT_W = IN_W + L
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [N-1:0][IN_W-1:0]    in,
  output logic [OUT_W-1:0]          sum,
  output logic                      out_valid
);
  localparam int unsigned NP = 1 << L;

  logic [OUT_W-1:0] lvl0 [NP];
  logic [OUT_W-1:0] node [1:L][NP/2];

  always_comb begin
    for (int i = 0; i < NP; i++) lvl0[i] = (i < N) ? OUT_W'(in[i]) : '0;
  end

  if (PIPE) begin : g_pipe
    always_ff @(posedge clk) begin
      for (int l = 1; l <= L; l++)
        for (int i = 0; i < (NP >> l); i++)
          node[l][i] <= (l == 1) ? lvl0[2*i] + lvl0[2*i+1]
                                 : node[l-1][2*i] + node[l-1][2*i+1];
    end
    logic [L-1:0] v;
    always_ff @(posedge clk) begin
      if (!rst_n) v <= '0;
      else        v <= L'({v, in_valid});
    end
    assign out_valid = v[L-1];
  end else begin : g_comb
    always_comb begin
      for (int l = 1; l <= L; l++)
        for (int i = 0; i < NP/2; i++)
          node[l][i] = '0;
      for (int l = 1; l <= L; l++)
        for (int i = 0; i < (NP >> l); i++)
          node[l][i] = (l == 1) ? lvl0[2*i] + lvl0[2*i+1]
                                : node[l-1][2*i] + node[l-1][2*i+1];
    end
    assign out_valid = in_valid;
  end

  assign sum = node[L][0];
endmodule
