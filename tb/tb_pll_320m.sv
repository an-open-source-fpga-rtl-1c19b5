// tb_pll_320m - 48 MHz input. Checks that c0 and locked stay low in
// reset, that locked rises after the lock count, and that c0 then has a
// 3.125 ns period (320 MHz) and a 50 % duty cycle.
`timescale 1ns / 1ps
module tb_pll_320m;
  logic inclk0 = 1'b0, areset = 1'b0, c0, locked;
  int checks = 0, failures = 0;
  realtime t_rise[$], t_fall[$];
  int in_edges = 0;

  pll_320m dut (.inclk0(inclk0), .areset(areset), .c0(c0), .locked(locked));

  always #10.41667 inclk0 = ~inclk0;
  always @(posedge inclk0) in_edges++;
  always @(posedge c0) t_rise.push_back($realtime);
  always @(negedge c0) t_fall.push_back($realtime);


  // assert the asynchronous resets with an edge
  initial #1 begin areset = 1'b1; end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200;
    checks++; if (c0 !== 1'b0 || locked !== 1'b0) failures++;
    areset = 1'b0; in_edges = 0;
    @(posedge locked);
    t_rise = {}; t_fall = {};
    checks++; if (in_edges < 4 || in_edges > 6) failures++;
    #1000;
    checks++; if (t_rise.size() < 300) failures++;
    for (int i = 1; i < t_rise.size(); i++) begin
      checks++;
      if (t_rise[i] - t_rise[i-1] < 3.120 || t_rise[i] - t_rise[i-1] > 3.130) failures++;
      checks++;
      if (t_fall[i-1] - t_rise[i-1] < 1.55 || t_fall[i-1] - t_rise[i-1] > 1.575) failures++;
    end
    // 320 cycles in 1 us
    checks++;
    if ((t_rise[t_rise.size()-1] - t_rise[0]) / (t_rise.size() - 1) < 3.12) failures++;
    areset = 1'b1;
    #100;
    checks++; if (locked !== 1'b0 || c0 !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
