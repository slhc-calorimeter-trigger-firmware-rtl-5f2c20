// calo_ref_pkg: reference model of the cluster pipeline for the
// testbenches, written from the algorithm description rather than from the
// RTL: tower threshold on E+H, cluster ECAL/HCAL sums and e/gamma test,
// fine-grain OR, half-tower position from H/S and V/S with real division,
// overlap pruning against the 8 neighbours (ties resolved towards the
// neighbour to the W, NW, N or NE), cluster threshold and pattern zeroing.
package calo_ref_pkg;
  import calo_pkg::*;

  localparam int MAXG = 17;

  typedef struct {
    int e [MAXG][MAXG];
    int h [MAXG][MAXG];
    bit fg [MAXG][MAXG];
    bit pass [MAXG][MAXG];
  } grid_in_t;

  function automatic int tower_et_ref(const ref grid_in_t g, input int r, input int c, input int thr);
    int eh;
    eh = g.e[r][c] + g.h[r][c];
    return (eh >= thr) ? eh : 0;
  endfunction

  function automatic int raw_sum(const ref grid_in_t g, input int rows, input int cols, input int r, input int c, input int thr);
    if (r < 0 || c < 0 || r >= rows || c >= cols) return 0;
    return tower_et_ref(g, r, c, thr) + tower_et_ref(g, r, c+1, thr)
         + tower_et_ref(g, r+1, c, thr) + tower_et_ref(g, r+1, c+1, thr);
  endfunction

  function automatic logic [1:0] pos_bin(real x);
    if (x < -0.5) return 2'd0;
    if (x < 0.0)  return 2'd1;
    if (x <= 0.5) return 2'd2;
    return 2'd3;
  endfunction

  function automatic cluster_t cluster_ref(const ref grid_in_t g, input int rows, input int cols, input int r, input int c,
                                           input int tower_thr, int cluster_thr, int epim_shift);
    cluster_t o;
    int t [4];
    int es, hs, own, p;
    real s, hh, vv;
    logic [3:0] m;
    int dr [8] = '{-1, -1, -1, 0, 0, 1, 1, 1};
    int dc [8] = '{-1, 0, 1, -1, 1, -1, 0, 1};
    logic [3:0] ovl [8] = '{4'b0001, 4'b0011, 4'b0010, 4'b0101, 4'b1010, 4'b0100, 4'b1100, 4'b1000};
    o = '0;
    if (!g.pass[r][c]) return o;
    es = 0; hs = 0;
    for (int k = 0; k < 4; k++) begin
      int rr, cc;
      rr = r + k / 2; cc = c + k % 2;
      t[k] = tower_et_ref(g, rr, cc, tower_thr);
      if (t[k] != 0 || (g.e[rr][cc] + g.h[rr][cc] >= tower_thr)) begin
        es += g.e[rr][cc]; hs += g.h[rr][cc];
      end
      if (g.fg[rr][cc]) o.fg = 1'b1;
    end
    o.egamma = (es > 0) && (hs <= (es >> epim_shift));
    s  = real'(t[0] + t[1] + t[2] + t[3]);
    hh = real'(t[1] + t[3] - t[0] - t[2]);
    vv = real'(t[2] + t[3] - t[0] - t[1]);
    o.hpos = (s == 0.0) ? 2'd2 : pos_bin(hh / s);
    o.vpos = (s == 0.0) ? 2'd2 : pos_bin(vv / s);
    own = t[0] + t[1] + t[2] + t[3];
    m = '0;
    for (int n = 0; n < 8; n++) begin
      int ne;
      ne = raw_sum(g, rows, cols, r + dr[n], c + dc[n], tower_thr);
      if (ne > own || (n >= 4 && ne == own)) m |= ovl[n];
    end
    p = 0;
    for (int k = 0; k < 4; k++) if (!m[k]) p += t[k];
    o.central = (m == 0);
    o.et = cluster_et_t'((p >= cluster_thr) ? p : 0);
    return o;
  endfunction

  // Random event: a low-energy background with a few energetic deposits.
  function automatic void random_event(ref grid_in_t g, input int rows, input int cols, input int kind);
    for (int r = 0; r <= rows; r++)
      for (int c = 0; c <= cols; c++) begin
        g.e[r][c]  = $urandom % 6;
        g.h[r][c]  = $urandom % 4;
        g.fg[r][c] = ($urandom % 20) == 0;
      end
    for (int n = 0; n < 2 + kind % 4; n++) begin
      int r, c;
      r = $urandom % (rows + 1); c = $urandom % (cols + 1);
      g.e[r][c] = 20 + $urandom % 236;
      g.h[r][c] = (n % 2) ? $urandom % 256 : $urandom % 8;
      if (c < cols) begin g.e[r][c+1] = $urandom % 120; g.h[r][c+1] = $urandom % 10; end
      if (kind % 5 == 0 && r < rows) begin g.e[r+1][c] = g.e[r][c]; g.h[r+1][c] = g.h[r][c]; end
    end
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++)
        g.pass[r][c] = ($urandom % 16) != 0;
  endfunction
endpackage
