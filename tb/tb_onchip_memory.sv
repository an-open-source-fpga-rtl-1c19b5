// tb_onchip_memory - fills the whole 16 kB RAM with a pattern through the
// data port, reads it back through both ports (one clock latency), then
// overwrites random words and checks them against a reference array.
`timescale 1ns / 1ps
module tb_onchip_memory;
  localparam int WORDS = 4096;
  logic clk = 1'b0, rst_n = 1'b1;
  logic cs = 1'b0, read = 1'b0, write = 1'b0, i_read = 1'b0;
  logic [11:0] addr = '0, i_addr = '0;
  logic [31:0] wdata = '0, rdata, i_rdata;
  logic rv, i_rv;
  logic [31:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  onchip_memory dut (
    .clk(clk), .rst_n(rst_n), .chipselect(cs), .read(read), .write(write),
    .address(addr), .writedata(wdata), .readdata(rdata), .readdatavalid(rv),
    .i_read(i_read), .i_address(i_addr), .i_readdata(i_rdata),
    .i_readdatavalid(i_rv));

  always #5 clk = ~clk;


  // assert the asynchronous resets with an edge
  initial #1 begin rst_n = 1'b0; end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pattern(int a);
    return 32'(a) * 32'h9E37_79B9 ^ 32'h5A5A_0F0F;
  endfunction

  initial begin
    #12 rst_n = 1'b1;
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk); cs = 1'b1; write = 1'b1; addr = 12'(a); wdata = pattern(a);
      ref_mem[a] = pattern(a);
    end
    @(negedge clk); cs = 1'b0; write = 1'b0;
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk); cs = 1'b1; read = 1'b1; addr = 12'(a);
      i_read = 1'b1; i_addr = 12'(WORDS - 1 - a);
      @(negedge clk); cs = 1'b0; read = 1'b0; i_read = 1'b0;
      checks += 2;
      if (!rv || rdata !== ref_mem[a]) failures++;
      if (!i_rv || i_rdata !== ref_mem[WORDS - 1 - a]) failures++;
    end
    for (int k = 0; k < 500; k++) begin
      int a;
      a = int'($urandom_range(0, WORDS - 1));
      @(negedge clk); cs = 1'b1; write = 1'b1; addr = 12'(a); wdata = $urandom;
      ref_mem[a] = wdata;
      @(negedge clk); write = 1'b0; read = 1'b1;
      a = int'($urandom_range(0, WORDS - 1)); addr = 12'(a);
      @(negedge clk); cs = 1'b0; read = 1'b0;
      checks++; if (!rv || rdata !== ref_mem[a]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
