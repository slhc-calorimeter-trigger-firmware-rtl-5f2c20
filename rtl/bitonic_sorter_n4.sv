// bitonic_sorter_n4: n-to-4 bitonic sorting unit.
//
// Returns the four largest of N keys (N a power of two, at least 8), each
// with the tag (for instance a position) that came with it. The network is
// built from bitonic merge units that keep only what the four largest need:
//   BM[2]   : sorts pairs, alternately ascending (+) and descending (-)  1 stage
//   BM[4]   : sorts groups of 4 formed by a + and a - pair              2 stages
//   BM[8]_4 : takes a + and a - group of 4 (a bitonic 8), keeps the
//             larger half (4 compare-selects) and sorts it with a BM[4]  3 stages
//             repeated log2(N) - 3 times, halving the candidates each time
//   MAX     : element-wise maximum of the last + and - group of 4         1 stage
// giving 3*log2(N) - 5 comparator stages and 3.5*N - 12 comparators. The
// MAX stage leaves the four largest keys in bitonic order (rising then
// falling, or the reverse), not fully sorted. The decomposition, stage and
// comparator counts follow the original design. Equal keys may come out
// with either tag.
//
// STAGE_REG bit s puts a register after comparator stage s, so the pipeline
// depth (latency in cycles) is the number of ones in STAGE_REG; the default
// registers every stage. out_valid follows in_valid by the same latency.
module bitonic_sorter_n4 #(
  parameter int unsigned N     = 16,
  parameter int unsigned KEY_W = 10,
  parameter int unsigned TAG_W = 4,
  localparam int unsigned LG    = $clog2(N),
  localparam int unsigned NS    = 3 * LG - 5,
  parameter logic [NS-1:0] STAGE_REG = '1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic [N-1:0][KEY_W-1:0]      in_key,
  input  logic [N-1:0][TAG_W-1:0]      in_tag,
  output logic [3:0][KEY_W-1:0]        out_key,
  output logic [3:0][TAG_W-1:0]        out_tag,
  output logic                         out_valid
);
  typedef struct packed {
    logic [KEY_W-1:0] key;
    logic [TAG_W-1:0] tag;
  } item_t;

  typedef enum logic [1:0] { OP_CMP, OP_HALF, OP_MAX } op_e;

  // What comparator stage s does: operation, compare distance, size of a
  // group sharing one direction, and number of live candidates.
  function automatic op_e stage_op(int s);
    if (s == NS - 1)                  return OP_MAX;
    if (s >= 3 && (s - 3) % 3 == 0)   return OP_HALF;
    return OP_CMP;
  endfunction

  function automatic int stage_dist(int s);
    if (s == 0) return 1;
    if (s == 1) return 2;
    if (s == 2) return 1;
    return ((s - 3) % 3 == 1) ? 2 : 1;
  endfunction

  function automatic int stage_grp(int s);
    return (s == 0) ? 2 : 4;
  endfunction

  function automatic int stage_live(int s);
    if (s < 3) return N;
    return N >> ((s - 3) / 3 + ((s - 3) % 3 == 0 ? 0 : 1));
  endfunction

  function automatic item_t [N-1:0] apply_stage(int s, item_t [N-1:0] d);
    item_t [N-1:0] o;
    int   stp, grp, live, a;
    bit   asc;
    o    = '0;
    stp = stage_dist(s);
    grp  = stage_grp(s);
    live = stage_live(s);
    case (stage_op(s))
      OP_CMP: begin
        for (int i = 0; i < N; i++) begin
          if (i < live && (i % (2 * stp)) < stp) begin
            asc = ((i / grp) % 2) == 0;
            if ((d[i].key > d[i+stp].key) == asc) begin
              o[i]      = d[i+stp];
              o[i+stp] = d[i];
            end else begin
              o[i]      = d[i];
              o[i+stp] = d[i+stp];
            end
          end
        end
      end
      OP_HALF: begin
        for (int i = 0; i < N / 2; i++) begin
          if (i < live / 2) begin
            a = 8 * (i / 4) + (i % 4);
            o[i] = (d[a].key >= d[a+4].key) ? d[a] : d[a+4];
          end
        end
      end
      default: begin  // OP_MAX
        for (int i = 0; i < 4; i++)
          o[i] = (d[i].key >= d[i+4].key) ? d[i] : d[i+4];
      end
    endcase
    return o;
  endfunction

  item_t [N-1:0] in_items;
  always_comb begin
    for (int i = 0; i < N; i++) in_items[i] = '{key: in_key[i], tag: in_tag[i]};
  end

  for (genvar s = 0; s < NS; s++) begin : g_st
    item_t [N-1:0] d, c, q;
    logic          vq;
    if (s == 0) begin : g_first
      assign d = in_items;
    end else begin : g_next
      assign d = g_st[s-1].q;
    end
    logic vd;
    if (s == 0) begin : g_vfirst
      assign vd = in_valid;
    end else begin : g_vnext
      assign vd = g_st[s-1].vq;
    end
    assign c = apply_stage(s, d);
    if (STAGE_REG[s]) begin : g_reg
      always_ff @(posedge clk) q <= c;
      always_ff @(posedge clk) begin
        if (!rst_n) vq <= 1'b0;
        else        vq <= vd;
      end
    end else begin : g_wire
      assign q  = c;
      assign vq = vd;
    end
  end

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      out_key[i] = g_st[NS-1].q[i].key;
      out_tag[i] = g_st[NS-1].q[i].tag;
    end
  end
  assign out_valid = g_st[NS-1].vq;
endmodule
