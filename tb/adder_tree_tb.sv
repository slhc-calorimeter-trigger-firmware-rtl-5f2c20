// Testbench for adder_tree: the default 64-input pipelined tree must give
// the sum of its random operands log2(64) = 6 cycles later, with out_valid
// alongside; a 63-input combinational 1-bit tree (a population count) is
// checked in the same cycle.
module adder_tree_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [63:0][10:0] in;
  logic [16:0]       sum;
  logic              in_valid, out_valid;
  logic [62:0][0:0]  bits;
  logic [6:0]        cnt;

  adder_tree dut (.clk, .rst_n, .in_valid, .in, .sum, .out_valid);
  adder_tree #(.N(63), .IN_W(1), .PIPE(1'b0)) dut_pop (
    .clk, .rst_n, .in_valid(1'b1), .in(bits), .sum(cnt), .out_valid()
  );

  localparam int LAT = 6, NV = 2000;
  int checks = 0, failures = 0;
  int exp_sum [NV];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in = '0; bits = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < NV + LAT; i++) begin
      int pc;
      if (i < NV) begin
        int s;
        s = 0;
        for (int k = 0; k < 64; k++) begin
          in[k] = (i % 10 == 0) ? 11'h7FF : 11'($urandom);
          s += in[k];
        end
        exp_sum[i] = s;
      end
      in_valid = i < NV;
      pc = 0;
      for (int k = 0; k < 63; k++) begin
        bits[k] = 1'((i % 9 == 0) ? 1 : $urandom);
        pc += bits[k];
      end
      #1;
      checks++;
      if (int'(cnt) != pc) begin failures++; $display("FAIL popcount %0d: %0d exp %0d", i, cnt, pc); end
      @(posedge clk); #1;
      if (i >= LAT - 1 && i - (LAT - 1) < NV) begin
        checks++;
        if (int'(sum) != exp_sum[i - (LAT - 1)] || !out_valid) begin
          failures++;
          $display("FAIL sum %0d: %0d exp %0d", i - (LAT - 1), sum, exp_sum[i - (LAT - 1)]);
        end
      end else if (i < LAT - 1) begin
        checks++;
        if (out_valid) begin failures++; $display("FAIL: out_valid too early"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
