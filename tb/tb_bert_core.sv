// tb_bert_core - drives the channel with a data clock and its inverse as
// the sampling clock, loops data_out back to data_in through a 7 ns wire
// and flips randomly chosen bits. The testbench counts the flipped bits
// and the bits sent and compares them with the two registers; it also
// checks data_out against its own PRBS model, the output gate and the
// asynchronous clear.
`timescale 1ns / 1ps
module tb_bert_core;
  logic data_clk = 1'b0, rst_n = 1'b1, cnt_clr = 1'b0, out_en = 1'b1;
  logic clk_run = 1'b0;
  logic data_out, data_in, wire_out, flip = 1'b0;
  logic [31:0] incorrect_bits, total_bits;
  int checks = 0, failures = 0;
  int exp_err = 0, exp_tot = 0;
  bit hist[$];
  bit ref_bit;

  bert_core dut (
    .data_clk(data_clk), .sample_clk(~data_clk), .rst_n(rst_n),
    .cnt_clr(cnt_clr), .out_en(out_en), .data_out(data_out),
    .data_in(data_in), .incorrect_bits(incorrect_bits),
    .total_bits(total_bits));

  always #50 if (clk_run) data_clk = ~data_clk;
  assign #7 wire_out = data_out;
  assign data_in = wire_out ^ flip;


  // assert the asynchronous resets with an edge
  initial #1 begin rst_n = 1'b0; cnt_clr = 1'b1; end
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference PRBS and error injection: new bit and flip decision per
  // rising edge; counted at the sampling (falling) edge
  always @(posedge data_clk) begin
    hist.push_back(~(hist[hist.size()-31] ^ hist[hist.size()-28]));
    ref_bit <= hist[hist.size()-31];
    flip    <= ($urandom_range(0, 9) == 0);
  end
  always @(negedge data_clk) begin
    if (!cnt_clr) begin
      exp_tot++;
      if (flip ^ (!out_en && ref_bit)) exp_err++;
    end
    if (out_en) begin
      checks++;
      if (data_out !== ref_bit) failures++;
    end else begin
      checks++;
      if (data_out !== 1'b0) failures++;
    end
  end

  task automatic check_counts(string what);
    checks += 2;
    if (incorrect_bits !== 32'(exp_err) || total_bits !== 32'(exp_tot)) begin
      failures += 2;
      $display("%s: incorrect %0d exp %0d, total %0d exp %0d", what,
               incorrect_bits, exp_err, total_bits, exp_tot);
    end
  endtask

  initial begin
    for (int i = 0; i < 31; i++) hist.push_back(1'b0);
    ref_bit = 1'b0;
    #20 rst_n = 1'b1;
    #20 cnt_clr = 1'b0;
    clk_run = 1'b1;
    repeat (2000) @(posedge data_clk);
    @(negedge data_clk); #10 clk_run = 1'b0;
    #100 check_counts("run 1");
    checks++; if (exp_err < 100) failures++;
    // clear with the clock stopped
    cnt_clr = 1'b1; #5;
    checks++; if (incorrect_bits !== 0 || total_bits !== 0) failures++;
    exp_err = 0; exp_tot = 0;
    cnt_clr = 1'b0; #5;
    // second run with the output gated off: every transmitted 1 is missed
    out_en = 1'b0;
    clk_run = 1'b1;
    repeat (500) @(posedge data_clk);
    @(negedge data_clk); #10 clk_run = 1'b0;
    #100 check_counts("run 2, output off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
