// Testbench for bitonic_sorter_n4. The default 16-to-4 unit (7 registered
// stages) and a 64-to-4 unit registered at every other stage (7 of 13) get
// random keys, including runs of equal keys, with the input index as tag.
// Each output set must hold the four largest keys, each with a tag whose
// input key equals it and no tag twice, after the expected latency.
module bitonic_sorter_n4_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              in_valid;
  logic [15:0][9:0]  k16;
  logic [15:0][3:0]  t16;
  logic [3:0][9:0]   ok16;
  logic [3:0][3:0]   ot16;
  logic              v16;
  logic [63:0][9:0]  k64;
  logic [63:0][5:0]  t64;
  logic [3:0][9:0]   ok64;
  logic [3:0][5:0]   ot64;
  logic              v64;

  bitonic_sorter_n4 dut (.clk, .rst_n, .in_valid, .in_key(k16), .in_tag(t16),
                         .out_key(ok16), .out_tag(ot16), .out_valid(v16));
  bitonic_sorter_n4 #(.N(64), .KEY_W(10), .TAG_W(6), .STAGE_REG(13'b1010101010101)) dut64 (
    .clk, .rst_n, .in_valid, .in_key(k64), .in_tag(t64),
    .out_key(ok64), .out_tag(ot64), .out_valid(v64));

  localparam int NV = 1500, L16 = 7, L64 = 7;
  int checks = 0, failures = 0;
  logic [15:0][9:0] h16 [NV];
  logic [63:0][9:0] h64 [NV];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checks one output set against the inputs it came from.
  function automatic int bad(int n, logic [63:0][9:0] keys, logic [3:0][9:0] ok, logic [3:0][5:0] ot);
    int srt [$];
    int got [$];
    for (int i = 0; i < n; i++) srt.push_back(int'(keys[i]));
    srt.rsort();
    for (int i = 0; i < 4; i++) got.push_back(int'(ok[i]));
    got.rsort();
    for (int i = 0; i < 4; i++) if (got[i] != srt[i]) return 1;
    for (int i = 0; i < 4; i++) begin
      if (int'(ot[i]) >= n || keys[ot[i]] != ok[i]) return 2;
      for (int j = 0; j < i; j++) if (ot[i] == ot[j]) return 3;
    end
    return 0;
  endfunction

  initial begin
    in_valid = 0; k16 = '0; k64 = '0;
    for (int i = 0; i < 16; i++) t16[i] = 4'(i);
    for (int i = 0; i < 64; i++) t64[i] = 6'(i);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < NV + L16; i++) begin
      if (i < NV) begin
        for (int k = 0; k < 16; k++) k16[k] = (i % 4 == 0) ? 10'($urandom % 6) : 10'($urandom);
        for (int k = 0; k < 64; k++) k64[k] = (i % 4 == 1) ? 10'($urandom % 6) : 10'($urandom);
        h16[i] = k16; h64[i] = k64;
      end
      in_valid = i < NV;
      @(posedge clk); #1;
      if (i >= L16 - 1 && i - (L16 - 1) < NV) begin
        int j, b;
        j = i - (L16 - 1);
        b = bad(16, 1024'(h16[j]), ok16, {8'd0, ot16[3], 2'd0, ot16[2], 2'd0, ot16[1], 2'd0, ot16[0]});
        checks++;
        if (b != 0 || !v16) begin failures++; $display("FAIL 16-to-4 set %0d (%0d)", j, b); end
        b = bad(64, h64[j], ok64, ot64);
        checks++;
        if (b != 0 || !v64) begin failures++; $display("FAIL 64-to-4 set %0d (%0d)", j, b); end
      end else if (i < L16 - 1) begin
        checks++;
        if (v16 || v64) begin failures++; $display("FAIL: valid too early"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
