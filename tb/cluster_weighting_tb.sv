// Testbench for cluster_weighting: random and hand-placed 2x2 clusters; the
// 2-bit positions must equal the bin of H/S and V/S computed here with
// real division ([-1,-0.5) -> 0, [-0.5,0) -> 1, [0,0.5] -> 2, (0.5,1] -> 3),
// two cycles after the towers.
module cluster_weighting_tb;
  import calo_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            in_valid, out_valid;
  tower_et_t [3:0] tower_et;
  logic [1:0]      hpos, vpos;

  cluster_weighting dut (.*);

  localparam int LAT = 2, NV = 4000;
  int checks = 0, failures = 0;
  int hist [4];
  tower_et_t [3:0] tw [NV];

  function automatic logic [1:0] bin(real x);
    if (x < -0.5)  return 2'd0;
    if (x < 0.0)   return 2'd1;
    if (x <= 0.5)  return 2'd2;
    return 2'd3;
  endfunction

  function automatic logic [3:0] ref_pos(tower_et_t [3:0] t);
    real s, h, v;
    s = real'(t[0]) + real'(t[1]) + real'(t[2]) + real'(t[3]);
    h = real'(t[1]) + real'(t[3]) - real'(t[0]) - real'(t[2]);
    v = real'(t[2]) + real'(t[3]) - real'(t[0]) - real'(t[1]);
    if (s == 0.0) return {2'd2, 2'd2};
    return {bin(h / s), bin(v / s)};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NV; i++) begin
      for (int k = 0; k < 4; k++) tw[i][k] = tower_et_t'($urandom);
      if (i % 4 == 1) tw[i][$urandom % 4] = '0;
      if (i % 8 == 2) begin  // one dominant tower
        tw[i] = '0;
        tw[i][i % 4] = tower_et_t'(1 + $urandom % 511);
        tw[i][(i + 1) % 4] = tower_et_t'($urandom % 20);
      end
      if (i % 16 == 3) begin  // exactly on the 0.5 boundary: H = S/2
        tw[i] = '{9'd0, 9'd100, 9'd100, 9'd200};  // t3=0 t2=100 t1=100 t0=200
      end
    end
  end

  initial begin
    in_valid = 0; tower_et = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < NV + LAT; i++) begin
      in_valid = i < NV;
      tower_et = (i < NV) ? tw[i] : '0;
      @(posedge clk); #1;
      if (i >= LAT - 1 && i - (LAT - 1) < NV) begin
        int j;
        logic [3:0] e;
        j = i - (LAT - 1);
        e = ref_pos(tw[j]);
        checks++;
        if ({hpos, vpos} !== e || !out_valid) begin
          failures++;
          $display("FAIL %0d: towers %p h=%0d v=%0d exp %0d %0d", j, tw[j], hpos, vpos, e[3:2], e[1:0]);
        end
        hist[hpos]++; hist[vpos]++;
      end
    end
    checks++;
    if (hist[0] == 0 || hist[1] == 0 || hist[2] == 0 || hist[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
