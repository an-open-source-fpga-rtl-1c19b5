// tb_bit_counter - random increments against a reference count, the
// asynchronous clear with the clock stopped, and wrap-around (4-bit copy).
`timescale 1ns / 1ps
module tb_bit_counter;
  logic clk = 1'b0, clr = 1'b0, inc = 1'b0;
  logic [31:0] count;
  logic [3:0]  count4;
  logic        run_clk = 1'b0;
  int checks = 0, failures = 0;
  longint ref_cnt;

  bit_counter dut (.clk(clk), .clr(clr), .inc(inc), .count(count));
  bit_counter #(.WIDTH(4)) dut4 (.clk(clk), .clr(clr), .inc(1'b1), .count(count4));

  always #5 if (run_clk) clk = ~clk;


  // assert the asynchronous resets with an edge
  initial #1 begin clr = 1'b1; end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3 clr = 1'b0;
    checks++; if (count !== 0 || count4 !== 0) failures++;
    run_clk = 1'b1;
    ref_cnt = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      checks++;
      if (count !== 32'(ref_cnt)) failures++;
      checks++;
      if (count4 !== 4'(i + 1)) failures++;
      inc = 1'($urandom_range(0, 1));
      if (inc) ref_cnt++;
    end
    // stop the clock high, then clear asynchronously
    @(posedge clk); run_clk = 1'b0; #20;
    checks++; if (count == 0) failures++;
    clr = 1'b1; #1;
    checks++; if (count !== 0 || count4 !== 0) failures++;
    #10 clr = 1'b0; #10;
    checks++; if (count !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
