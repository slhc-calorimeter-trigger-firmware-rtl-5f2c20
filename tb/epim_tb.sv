// Testbench for epim: random and corner ECAL/HCAL sums every cycle; the
// e/gamma bit must equal (E > 0 && H <= E >> shift) exactly two cycles later.
module epim_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid, egamma, out_valid;
  logic [9:0] ecal_sum, hcal_sum;
  logic [2:0] ratio_shift;

  epim dut (.*);

  int checks = 0, failures = 0, n_eg = 0, n_not = 0;
  localparam int LAT = 2, NV = 3000;
  bit exp_eg [NV];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; ecal_sum = 0; hcal_sum = 0; ratio_shift = 3;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < NV + LAT; i++) begin
      if (i < NV) begin
        ecal_sum    = 10'($urandom);
        ratio_shift = 3'($urandom);
        case (i % 4)
          0: hcal_sum = 10'($urandom);
          1: hcal_sum = ecal_sum >> ratio_shift;           // on the limit
          2: hcal_sum = (ecal_sum >> ratio_shift) + 10'd1; // just above
          default: begin ecal_sum = (i % 8 == 3) ? 10'd0 : ecal_sum; hcal_sum = 10'($urandom % 4); end
        endcase
        in_valid = 1;
        exp_eg[i] = (ecal_sum != 0) && (int'(hcal_sum) <= (int'(ecal_sum) >> ratio_shift));
      end else in_valid = 0;
      @(posedge clk); #1;
      if (i >= LAT - 1 && i - (LAT - 1) < NV) begin
        checks++;
        if (egamma !== exp_eg[i - (LAT - 1)] || !out_valid) begin
          failures++;
          $display("FAIL at %0d: egamma=%b exp=%b v=%b", i - (LAT - 1), egamma, exp_eg[i - (LAT - 1)], out_valid);
        end
        if (egamma) n_eg++; else n_not++;
      end
    end
    checks++;
    if (n_eg == 0 || n_not == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
