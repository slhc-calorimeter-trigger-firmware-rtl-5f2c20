// End-to-end testbench for calo_trigger_top at its default size (8x8
// clusters, 9x9 towers over 6 dual tiles / 12 links). Random events
// (background plus a few energetic deposits) are packed into 8-word link
// frames exactly as the input buffers expect and sent back to back, with an
// idle gap and an aborted frame in between. For every event the testbench
// computes the cluster records, the isolation bits, the jet sums and the
// four largest electron, tau and jet candidates with the reference model,
// checks them when each valid strobe fires, and checks each latency:
// clusters 8 cycles after the last word of a frame, isolation/jets 6 later,
// sorted candidates 14 after those. Every mechanism of the design must
// occur at least once.
module calo_trigger_top_tb;
  import calo_pkg::*;
  import calo_ref_pkg::*;
  localparam int R = 8, C = 8, NT = 6, NV = 24;
  localparam int TTHR = 4, CTHR = 12, ESH = 3, ETHR = 20, TAUTHR = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NT-1:0][1:0][15:0]         lane_data;
  logic                             lane_valid, lane_sof;
  logic [R-1:0][C-1:0]              pattern_pass;
  calo_cfg_t                        cfg;
  cluster_t [R-1:0][C-1:0]          clusters;
  logic                             clusters_valid, obj_valid, sort_valid;
  logic [R-1:0][C-1:0]              iso_e, iso_tau;
  logic [R-1:0][C-1:0][JET_ET_W-1:0] jet_et;
  cluster_et_t [3:0]                top_e_key, top_tau_key;
  logic [3:0][5:0]                  top_e_tag, top_tau_tag, top_jet_tag;
  logic [3:0][JET_ET_W-1:0]         top_jet_key;

  calo_trigger_top dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Expected results per event.
  cluster_t exp_cl  [NV][R][C];
  bit       exp_ie  [NV][R][C];
  bit       exp_it  [NV][R][C];
  int       exp_jet [NV][R][C];
  int       last_word_cycle [NV];

  // Mechanism counters.
  int n_tower_zeroed = 0, n_central = 0, n_pruned = 0, n_cut = 0, n_eg = 0, n_fg = 0, n_pat = 0;
  int n_iso_e = 0, n_noniso_e = 0, n_iso_t = 0, n_noniso_t = 0, n_jet = 0, n_jet_rej = 0;
  int n_sort_drop = 0, n_gap = 0, n_abort = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lat_et(int ev, int r, int c);
    if (r < 0 || c < 0 || r >= R || c >= C) return 0;
    return exp_cl[ev][r][c].et;
  endfunction

  // Isolation and jets of one event from its expected clusters.
  function automatic void objects_ref(int ev);
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        int ce, ne, nt, l, rr, u, d, et, rl, ud;
        ce = exp_cl[ev][r][c].et;
        ne = 0; nt = 0; l = 0; rr = 0; u = 0; d = 0;
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++) begin
            int v;
            v = lat_et(ev, r + i - 3, c + j - 3);
            if (!(i == 3 && j == 3)) begin
              if (v > int'(cfg.e_thr)) ne++;
              if (v > int'(cfg.tau_thr)) nt++;
            end
            if (i < 4) u += v; else d += v;
            if (j < 4) l += v; else rr += v;
          end
        exp_ie[ev][r][c] = ne < (int'(cfg.e_a) + int'(cfg.e_b) * ce + int'(cfg.e_c) * ce * ce);
        exp_it[ev][r][c] = nt < (int'(cfg.tau_a) + int'(cfg.tau_b) * ce + int'(cfg.tau_c) * ce * ce);
        et = l + rr;
        rl = (rr > l) ? rr - l : l - rr;
        ud = (u > d) ? u - d : d - u;
        exp_jet[ev][r][c] = (exp_cl[ev][r][c].central && rl < (et >> 3) && ud < (et >> 3)) ? et : 0;
      end
  endfunction

  // The four largest of 64 keys must be the output's keys; tags must point at them.
  task automatic check_top4(string kind, int ev, int keys [64], logic [3:0][31:0] ok, logic [3:0][5:0] ot);
    int srt [$];
    int got [$];
    int nz;
    nz = 0;
    for (int i = 0; i < 64; i++) begin
      srt.push_back(keys[i]);
      if (keys[i] != 0) nz++;
    end
    if (nz > 4) n_sort_drop++;
    srt.rsort();
    for (int i = 0; i < 4; i++) got.push_back(int'(ok[i]));
    got.rsort();
    for (int i = 0; i < 4; i++)
      check(got[i] == srt[i], $sformatf("%s event %0d rank %0d: %0d exp %0d", kind, ev, i, got[i], srt[i]));
    for (int i = 0; i < 4; i++)
      check(keys[ot[i]] == int'(ok[i]), $sformatf("%s event %0d tag %0d", kind, ev, i));
  endtask

  // Driver.
  initial begin
    grid_in_t g;
    lane_valid = 0; lane_sof = 0; lane_data = '0; pattern_pass = '0;
    cfg = '0;
    cfg.tower_thr = 9'(TTHR); cfg.cluster_thr = 11'(CTHR); cfg.epim_shift = 3'(ESH);
    cfg.e_thr = 11'(ETHR); cfg.tau_thr = 11'(TAUTHR);
    cfg.e_a = 8'd2; cfg.tau_a = 8'd1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    for (int ev = 0; ev < NV; ev++) begin
      logic [NT*15-1:0][15:0] words;
      logic [NT*15-1:0]       fgs;
      random_event(g, R, C, ev);
      words = '0; fgs = '0;
      for (int r = 0; r <= R; r++)
        for (int c = 0; c <= C; c++) begin
          int t;
          t = r * (C + 1) + c;
          words[t] = {8'(g.h[r][c]), 8'(g.e[r][c])};
          fgs[t]   = g.fg[r][c];
          if (g.e[r][c] + g.h[r][c] < TTHR && g.e[r][c] + g.h[r][c] > 0) n_tower_zeroed++;
        end
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          exp_cl[ev][r][c] = cluster_ref(g, R, C, r, c, TTHR, CTHR, ESH);
          if (!g.pass[r][c]) n_pat++;
          else if (exp_cl[ev][r][c].central) n_central++;
          else n_pruned++;
          if (g.pass[r][c] && exp_cl[ev][r][c].et == 0 && raw_sum(g, R, C, r, c, TTHR) > 0) n_cut++;
          if (exp_cl[ev][r][c].egamma) n_eg++;
          if (exp_cl[ev][r][c].fg) n_fg++;
        end
      objects_ref(ev);
      // An aborted partial frame before event 5, an idle gap before event 9.
      if (ev == 5) begin
        for (int k = 0; k < 3; k++) begin
          lane_valid = 1; lane_sof = (k == 0); lane_data = {NT*2{16'($urandom)}};
          @(posedge clk); #1;
        end
        n_abort++;
      end
      if (ev == 9) begin
        lane_valid = 0; lane_sof = 0;
        repeat (3) @(posedge clk);
        #1 n_gap++;
      end
      for (int k = 0; k < 8; k++) begin
        lane_valid = 1;
        lane_sof   = (k == 0);
        pattern_pass = '0;
        if (k == 0)
          for (int r = 0; r < R; r++)
            for (int c = 0; c < C; c++) pattern_pass[r][c] = g.pass[r][c];
        for (int t = 0; t < NT; t++) begin
          lane_data[t][0] = words[t * 15 + k];
          lane_data[t][1] = (k < 7) ? words[t * 15 + 8 + k] : {1'b0, fgs[t * 15 +: 15]};
        end
        if (k == 7) last_word_cycle[ev] = cycle;
        @(posedge clk); #1;
      end
    end
    lane_valid = 0; lane_sof = 0;
  end

  // Monitors.
  int ev_cl = 0, ev_obj = 0, ev_sort = 0;
  always @(posedge clk) begin
    if (rst_n && clusters_valid) begin
      check(ev_cl < NV, "extra cluster frame");
      if (ev_cl < NV) begin
        check(cycle - last_word_cycle[ev_cl] == 8,
              $sformatf("cluster latency %0d", cycle - last_word_cycle[ev_cl]));
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++)
            check(clusters[r][c] == exp_cl[ev_cl][r][c],
                  $sformatf("event %0d cluster (%0d,%0d) %h exp %h", ev_cl, r, c, clusters[r][c], exp_cl[ev_cl][r][c]));
      end
      ev_cl++;
    end
    if (rst_n && obj_valid) begin
      if (ev_obj < NV) begin
        check(cycle - last_word_cycle[ev_obj] == 14, "object latency");
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++) begin
            check(iso_e[r][c] == exp_ie[ev_obj][r][c], $sformatf("event %0d iso_e (%0d,%0d)", ev_obj, r, c));
            check(iso_tau[r][c] == exp_it[ev_obj][r][c], $sformatf("event %0d iso_tau (%0d,%0d)", ev_obj, r, c));
            check(int'(jet_et[r][c]) == exp_jet[ev_obj][r][c],
                  $sformatf("event %0d jet (%0d,%0d) %0d exp %0d", ev_obj, r, c, jet_et[r][c], exp_jet[ev_obj][r][c]));
            if (exp_ie[ev_obj][r][c]) n_iso_e++; else n_noniso_e++;
            if (exp_it[ev_obj][r][c]) n_iso_t++; else n_noniso_t++;
            if (exp_jet[ev_obj][r][c] != 0) n_jet++;
            else if (exp_cl[ev_obj][r][c].central && exp_cl[ev_obj][r][c].et != 0) n_jet_rej++;
          end
      end
      ev_obj++;
    end
    if (rst_n && sort_valid) begin
      if (ev_sort < NV) begin
        int ke [64], kt [64], kj [64];
        logic [3:0][31:0] oe, ot, oj;
        check(cycle - last_word_cycle[ev_sort] == 28, "sort latency");
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++) begin
            cluster_t x;
            x = exp_cl[ev_sort][r][c];
            ke[r * C + c] = (x.central && x.egamma && exp_ie[ev_sort][r][c]) ? int'(x.et) : 0;
            kt[r * C + c] = (x.central && exp_it[ev_sort][r][c]) ? int'(x.et) : 0;
            kj[r * C + c] = exp_jet[ev_sort][r][c];
          end
        for (int i = 0; i < 4; i++) begin
          oe[i] = 32'(top_e_key[i]); ot[i] = 32'(top_tau_key[i]); oj[i] = 32'(top_jet_key[i]);
        end
        check_top4("electron", ev_sort, ke, oe, top_e_tag);
        check_top4("tau", ev_sort, kt, ot, top_tau_tag);
        check_top4("jet", ev_sort, kj, oj, top_jet_tag);
      end
      ev_sort++;
      if (ev_sort == NV) finish_run();
    end
  end

  task automatic finish_run();
    $display("tower-zeroed=%0d central=%0d pruned=%0d cluster-cut=%0d egamma=%0d fg=%0d pattern-zeroed=%0d",
             n_tower_zeroed, n_central, n_pruned, n_cut, n_eg, n_fg, n_pat);
    $display("iso_e=%0d/%0d iso_tau=%0d/%0d jets=%0d jets-rejected=%0d sort-with-drops=%0d gap=%0d abort=%0d",
             n_iso_e, n_noniso_e, n_iso_t, n_noniso_t, n_jet, n_jet_rej, n_sort_drop, n_gap, n_abort);
    check(ev_cl == NV && ev_obj == NV, "frame count");
    if (n_tower_zeroed == 0) begin failures++; $display("FAIL: no tower zeroed"); end
    if (n_central == 0 || n_pruned == 0) begin failures++; $display("FAIL: no local maximum or no pruning"); end
    if (n_cut == 0) begin failures++; $display("FAIL: cluster threshold never cut"); end
    if (n_eg == 0 || n_fg == 0 || n_pat == 0) begin failures++; $display("FAIL: e/gamma, FG or pattern zeroing missing"); end
    if (n_iso_e == 0 || n_noniso_e == 0 || n_iso_t == 0 || n_noniso_t == 0) begin failures++; $display("FAIL: isolation not exercised both ways"); end
    if (n_jet == 0 || n_jet_rej == 0) begin failures++; $display("FAIL: jet accept/reject missing"); end
    if (n_sort_drop == 0) begin failures++; $display("FAIL: sorter never had to drop candidates"); end
    checks += 7;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
