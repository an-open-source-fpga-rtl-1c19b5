// tb_avalon_interconnect - the slaves are modelled in the testbench: each
// returns its own tag one clock after a read when selected. Checks the
// chipselect for RAM addresses, every PIO word, the UART window and
// unmapped addresses,
// and that the read data come back from the right slave.
`timescale 1ns / 1ps
module tb_avalon_interconnect;
  import os_bert_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  av_req_t req;
  av_rsp_t rsp, ram_rsp, uart_rsp;
  av_rsp_t pio_rsp [N_PIO];
  logic ram_cs, uart_cs;
  logic [N_PIO-1:0] pio_cs;
  int checks = 0, failures = 0;

  avalon_interconnect dut (.clk(clk), .rst_n(rst_n), .m_req(req), .m_rsp(rsp),
    .ram_cs(ram_cs), .ram_rsp(ram_rsp), .pio_cs(pio_cs), .pio_rsp(pio_rsp),
    .uart_cs(uart_cs), .uart_rsp(uart_rsp));

  always #5 clk = ~clk;

  // slave models
  always_ff @(posedge clk) begin
    ram_rsp.readdatavalid <= ram_cs && req.read;
    ram_rsp.readdata      <= 32'hAAAA_0000 | 32'(req.address);
    uart_rsp.readdatavalid <= uart_cs && req.read;
    uart_rsp.readdata      <= 32'h5555_0000 | 32'(req.address);
    for (int i = 0; i < N_PIO; i++) begin
      pio_rsp[i].readdatavalid <= pio_cs[i] && req.read;
      pio_rsp[i].readdata      <= 32'h1000_0000 + 32'(i);
    end
  end


  // assert the asynchronous resets with an edge
  initial #1 begin rst_n = 1'b0; end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected slave: -1 unmapped, 0 RAM, 1+i PIO i, 100 UART
  function automatic int expect_slave(logic [15:0] a);
    if (a < 16'd16384) return 0;
    if (a >= 16'h9000 && a < 16'h9010) return 100;
    if (a >= 16'h8000 && a < 16'h8000 + 16'(4 * N_PIO)) return 1 + int'((a - 16'h8000) >> 2);
    return -1;
  endfunction

  task automatic probe(logic [15:0] a);
    int s;
    logic [31:0] exp_data;
    s = expect_slave(a);
    @(negedge clk); req.address = a; req.read = 1'b1;
    #1;
    checks += 2;
    if (ram_cs !== (s == 0)) failures++;
    if (uart_cs !== (s == 100)) failures++;
    for (int i = 0; i < N_PIO; i++) begin
      checks++;
      if (pio_cs[i] !== (s == 1 + i)) failures++;
    end
    @(negedge clk); req.read = 1'b0;
    exp_data = s < 0 ? 32'h0 : s == 0 ? (32'hAAAA_0000 | 32'(a)) :
               s == 100 ? (32'h5555_0000 | 32'(a)) : 32'h1000_0000 + 32'(s - 1);
    checks++;
    if (rsp.readdatavalid !== 1'b1 || rsp.readdata !== exp_data) begin
      failures++;
      $display("addr %h: got %h valid %b exp %h", a, rsp.readdata, rsp.readdatavalid, exp_data);
    end
  endtask

  initial begin
    req = '0;
    #12 rst_n = 1'b1;
    probe(16'h0000); probe(16'h0004); probe(16'h3FFC); probe(16'h4000);
    for (int i = 0; i <= N_PIO; i++) probe(16'h8000 + 16'(4 * i));
    probe(16'h7FFC); probe(16'hFFFC);
    probe(16'h8FFC); probe(16'h9000); probe(16'h9004); probe(16'h9008);
    probe(16'h900C); probe(16'h9010);
    for (int k = 0; k < 200; k++) probe(16'($urandom) & 16'hFFFC);
    @(negedge clk);
    checks++; if (rsp.readdatavalid !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
