// tb_lfsr_prbg - checks the PRBS generator against the recurrence
// s[t] = NOT(s[t-31] XOR s[t-28]) computed in the testbench, starting
// from the all-zero reset state. Also checks that a reset mid-run
// restarts the sequence and that the state never sticks.
`timescale 1ns / 1ps
module tb_lfsr_prbg;
  logic clk = 1'b0, rst_n = 1'b1;
  logic bit_out;
  logic [30:0] state;
  int checks = 0, failures = 0;
  bit hist[$];
  int ones;

  lfsr_prbg dut (.clk(clk), .rst_n(rst_n), .bit_out(bit_out), .state(state));

  always #5 clk = ~clk;


  // assert the asynchronous resets with an edge
  initial #1 begin rst_n = 1'b0; end
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_run(int n);
    hist = {};
    for (int i = 0; i < 31; i++) hist.push_back(1'b0);
    ones = 0;
    for (int t = 0; t < n; t++) begin
      // output is the bit fed back 31 clocks ago
      checks++;
      if (bit_out !== hist[hist.size()-31]) begin
        failures++;
        if (failures < 5) $display("mismatch at t=%0d: got %b", t, bit_out);
      end
      ones += int'(bit_out);
      hist.push_back(~(hist[hist.size()-31] ^ hist[hist.size()-28]));
      @(posedge clk); #1;
    end
    checks++;
    if (ones < n / 4 || ones > 3 * n / 4) failures++;
  endtask

  initial begin
    #12 rst_n = 1'b1;
    @(posedge clk); #1;
    // first posedge after reset release already shifted once: restart
    rst_n = 1'b0; #1;
    checks++; if (state !== '0) failures++;
    @(negedge clk); rst_n = 1'b1; #1;
    check_run(3000);
    // reset mid-run
    @(negedge clk); rst_n = 1'b0; #1;
    checks++; if (state !== '0 || bit_out !== 1'b0) failures++;
    @(negedge clk); rst_n = 1'b1; #1;
    check_run(500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
