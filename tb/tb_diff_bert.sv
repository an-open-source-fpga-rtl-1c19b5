// tb_diff_bert - loops both conductors back with independent random bit
// flips. The testbench counts flips on A, on B, samples with a flip on
// either, and all samples, and compares them with the four registers. It
// also checks that B carries the complement of A and the clear.
`timescale 1ns / 1ps
module tb_diff_bert;
  logic data_clk = 1'b0, rst_n = 1'b1, cnt_clr = 1'b0, out_en = 1'b1;
  logic clk_run = 1'b0;
  logic out_a, out_b, in_a, in_b, flip_a = 1'b0, flip_b = 1'b0;
  logic [31:0] err_a, err_b, err_c, total;
  int checks = 0, failures = 0;
  int exp_a = 0, exp_b = 0, exp_c = 0, exp_t = 0, both = 0;

  diff_bert dut (
    .data_clk(data_clk), .sample_clk(~data_clk), .rst_n(rst_n),
    .cnt_clr(cnt_clr), .out_en(out_en),
    .data_out_a(out_a), .data_out_b(out_b),
    .data_in_a(in_a), .data_in_b(in_b),
    .incorrect_a(err_a), .incorrect_b(err_b), .incorrect_c(err_c),
    .total_bits(total));

  always #50 if (clk_run) data_clk = ~data_clk;
  assign #9 in_a = out_a ^ flip_a;
  assign #4 in_b = out_b ^ flip_b;


  // assert the asynchronous resets with an edge
  initial #1 begin rst_n = 1'b0; cnt_clr = 1'b1; end
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge data_clk) begin
    flip_a <= ($urandom_range(0, 7) == 0);
    flip_b <= ($urandom_range(0, 5) == 0);
  end
  always @(negedge data_clk) begin
    exp_t++;
    if (flip_a) exp_a++;
    if (flip_b) exp_b++;
    if (flip_a || flip_b) exp_c++;
    if (flip_a && flip_b) both++;
    checks++;
    if (out_b !== ~out_a) failures++;
  end

  initial begin
    #20 rst_n = 1'b1;
    #20 cnt_clr = 1'b0;
    clk_run = 1'b1;
    repeat (3000) @(posedge data_clk);
    @(negedge data_clk); #10 clk_run = 1'b0;
    #100;
    checks += 4;
    if (err_a !== 32'(exp_a)) failures++;
    if (err_b !== 32'(exp_b)) failures++;
    if (err_c !== 32'(exp_c)) failures++;
    if (total !== 32'(exp_t)) failures++;
    $display("A %0d/%0d B %0d/%0d C %0d/%0d total %0d/%0d both %0d",
             err_a, exp_a, err_b, exp_b, err_c, exp_c, total, exp_t, both);
    checks++; if (both == 0 || exp_c == exp_a + exp_b) failures++;
    cnt_clr = 1'b1; #5;
    checks++;
    if (err_a !== 0 || err_b !== 0 || err_c !== 0 || total !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
