// Testbench for tower_input_buffer: sends random 8-word frames on both
// lanes, with idle gaps and one aborted frame, and checks that the 15 tower
// words and 15 fine-grain bits come out in frame order one cycle after the
// last word, with frame_valid high for exactly that cycle.
module tower_input_buffer_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0][15:0]  lane_data;
  logic              lane_valid, lane_sof;
  logic [14:0][15:0] towers;
  logic [14:0]       fg;
  logic              frame_valid;

  tower_input_buffer dut (.*);

  int checks = 0, failures = 0;
  int fv_count = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && frame_valid) fv_count++;

  initial begin
    logic [15:0][15:0] w;
    int expected_frames;
    lane_valid = 0; lane_sof = 0; lane_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    expected_frames = 0;
    for (int f = 0; f < 40; f++) begin
      bit abort;
      abort = (f == 7);
      for (int i = 0; i < 16; i++) w[i] = 16'($urandom);
      for (int k = 0; k < 8; k++) begin
        // occasional idle cycle between words
        if ((f % 3 == 1) && k == 4) begin
          @(posedge clk); #1 lane_valid = 0; lane_sof = 0;
        end
        @(posedge clk); #1;
        lane_valid = 1; lane_sof = (k == 0);
        lane_data[0] = w[k]; lane_data[1] = w[8 + k];
        check(frame_valid == 1'b0, "frame_valid early");
        if (abort && k == 5) break;
      end
      if (!abort) begin
        expected_frames++;
        @(posedge clk); #1;
        lane_valid = 0; lane_sof = 0;
        check(frame_valid == 1'b1, $sformatf("frame_valid missing frame %0d", f));
        for (int t = 0; t < 15; t++)
          check(towers[t] == w[t], $sformatf("tower %0d frame %0d", t, f));
        check(fg == w[15][14:0], $sformatf("fg frame %0d", f));
        @(posedge clk); #1;
        check(frame_valid == 1'b0, "frame_valid longer than one cycle");
        for (int t = 0; t < 15; t++)
          check(towers[t] == w[t], "tower words not held");
      end
    end
    @(posedge clk); #1;
    check(fv_count == expected_frames, $sformatf("frames %0d expected %0d", fv_count, expected_frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
