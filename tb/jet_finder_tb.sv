// Testbench for jet_finder: random 8x8 lattices, some balanced (accepted),
// some with energy piled in one half (rejected), with the central bit set or
// not, and some whose imbalance equals ET/8 exactly. jet_et must equal the total ET when the centre is a local maximum and
// both half-sum imbalances are below ET/8, else 0, six cycles later.
module jet_finder_tb;
  import calo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                        in_valid, central, out_valid;
  cluster_et_t [7:0][7:0]      lattice;
  logic [JET_ET_W-1:0]         jet_et;

  jet_finder dut (.*);

  localparam int LAT = 6, NV = 2000;
  int checks = 0, failures = 0, n_jet = 0, n_unbal = 0;
  int exp_j [NV];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; central = 0; lattice = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < NV + LAT; i++) begin
      if (i < NV) begin
        int l, r, u, d, et, rl, ud;
        l = 0; r = 0; u = 0; d = 0;
        for (int y = 0; y < 8; y++)
          for (int x = 0; x < 8; x++) begin
            lattice[y][x] = cluster_et_t'($urandom % 64);
            if (i % 3 == 1 && x >= 4) lattice[y][x] = cluster_et_t'($urandom % 48);
            if (i % 3 == 2 && y < 4 && x < 4) lattice[y][x] = cluster_et_t'(200 + $urandom % 1000);
            // Exactly on the limit: 64 x 7 + 2 x 32 = 512, imbalance 64 = 512 >> 3.
            if (i % 6 == 5) lattice[y][x] = cluster_et_t'((y == 0 && (x == 0 || x == 7)) ? 39 : 7);
            if (i % 12 == 11) lattice[y][x] = cluster_et_t'((x == 0 && (y == 0 || y == 7)) ? 39 : 7);
            if (y < 4) u += lattice[y][x]; else d += lattice[y][x];
            if (x < 4) l += lattice[y][x]; else r += lattice[y][x];
          end
        central = (i % 5 != 0);
        et = l + r;
        rl = (r > l) ? r - l : l - r;
        ud = (u > d) ? u - d : d - u;
        exp_j[i] = (central && rl < (et >> 3) && ud < (et >> 3)) ? et : 0;
        if (central && exp_j[i] == 0) n_unbal++;
      end
      in_valid = i < NV;
      @(posedge clk); #1;
      if (i >= LAT - 1 && i - (LAT - 1) < NV) begin
        int j;
        j = i - (LAT - 1);
        checks++;
        if (int'(jet_et) != exp_j[j] || !out_valid) begin
          failures++;
          $display("FAIL %0d: %0d exp %0d", j, jet_et, exp_j[j]);
        end
        if (jet_et != 0) n_jet++;
      end
    end
    checks++;
    if (n_jet == 0 || n_unbal == 0) failures++;
    $display("jets=%0d rejected-imbalanced=%0d", n_jet, n_unbal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
