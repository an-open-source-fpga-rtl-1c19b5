// tb_freq_divider - 320 MHz input clock (3.125 ns). Checks the half
// periods at 1 MHz (160 cycles) and 0.5 MHz (320 cycles), the average
// rate at 3 MHz (half periods of 53 or 54 cycles, 1600 cycles per 30
// half periods), the maximum rate input/2, that the output holds low when
// stopped and finishes a high phase after run drops.
`timescale 1ns / 1ps
module tb_freq_divider;
  logic clk = 1'b0, rst_n = 1'b1, run = 1'b0, clk_out;
  logic [31:0] input_freq = 32'd320_000_000, desired_freq = 32'd1_000_000;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint last_edge;
  int halves[$];
  int stops_high = 0;

  freq_divider dut (.clk(clk), .rst_n(rst_n), .run(run),
                    .input_freq(input_freq), .desired_freq(desired_freq),
                    .clk_out(clk_out));

  always #1.5625 clk = ~clk;
  always @(posedge clk) cyc++;

  always @(clk_out) begin
    halves.push_back(int'(cyc - last_edge));
    last_edge = cyc;
  end


  // assert the asynchronous resets with an edge
  initial #1 begin rst_n = 1'b0; end
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(int n_halves);
    halves = {};
    run = 1'b1;
    wait (halves.size() == n_halves + 1);
    @(negedge clk) run = 1'b0;
    repeat (400) @(posedge clk);
    checks++; if (clk_out !== 1'b0) failures++;
    void'(halves.pop_front());  // start-up interval
  endtask

  initial begin
    #10 rst_n = 1'b1;
    repeat (5) @(posedge clk);
    checks++; if (clk_out !== 1'b0) failures++;
    // 1 MHz
    measure(10);
    foreach (halves[i]) begin
      checks++;
      if (halves[i] != 160) begin failures++; $display("1M half %0d", halves[i]); end
    end
    // 0.5 MHz
    desired_freq = 32'd500_000;
    measure(6);
    foreach (halves[i]) begin
      checks++; if (halves[i] != 320) failures++;
    end
    // 3 MHz: 320/6 = 53.33 cycles per half period
    desired_freq = 32'd3_000_000;
    measure(30);
    begin
      int sum = 0;
      for (int i = 0; i < 30; i++) begin
        sum += halves[i];
        checks++; if (halves[i] != 53 && halves[i] != 54) failures++;
      end
      // last interval may be cut when run drops high: use first 30
      checks++; if (sum < 1599 || sum > 1601) begin failures++; $display("3M sum %0d", sum); end
    end
    // maximum rate: toggle every cycle
    desired_freq = 32'd160_000_000;
    measure(20);
    foreach (halves[i]) begin
      checks++; if (halves[i] != 1) failures++;
    end
    // stop in the high phase: the high phase is completed
    desired_freq = 32'd1_000_000;
    run = 1'b1;
    @(posedge clk_out); repeat (20) @(posedge clk);
    run = 1'b0;
    last_edge = cyc; halves = {};
    @(negedge clk_out);
    checks++; if (cyc - last_edge < 130) failures++;
    repeat (1000) @(posedge clk);
    checks++; if (clk_out !== 1'b0 || halves.size() != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
