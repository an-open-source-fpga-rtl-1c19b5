// tb_avalon_pio - an output PIO (write, read back, drive out_port, reset
// value) and an input PIO (reads in_port, ignores writes), both with a
// read latency of one clock.
`timescale 1ns / 1ps
module tb_avalon_pio;
  logic clk = 1'b0, rst_n = 1'b1;
  logic cs_o = 1'b0, cs_i = 1'b0, read = 1'b0, write = 1'b0;
  logic [31:0] wdata = '0;
  logic [31:0] rd_o, rd_i, out_o, out_i, in_i = '0;
  logic rv_o, rv_i;
  int checks = 0, failures = 0;

  avalon_pio #(.IS_OUTPUT(1'b1), .RESET_VALUE(32'd320_000_000)) dut_o (
    .clk(clk), .rst_n(rst_n), .chipselect(cs_o), .read(read), .write(write),
    .writedata(wdata), .readdata(rd_o), .readdatavalid(rv_o),
    .in_port('0), .out_port(out_o));
  avalon_pio #(.IS_OUTPUT(1'b0)) dut_i (
    .clk(clk), .rst_n(rst_n), .chipselect(cs_i), .read(read), .write(write),
    .writedata(wdata), .readdata(rd_i), .readdatavalid(rv_i),
    .in_port(in_i), .out_port(out_i));

  always #5 clk = ~clk;


  // assert the asynchronous resets with an edge
  initial #1 begin rst_n = 1'b0; end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_write(bit sel_out, logic [31:0] d);
    @(negedge clk); cs_o = sel_out; cs_i = !sel_out; write = 1'b1; wdata = d;
    @(negedge clk); cs_o = 1'b0; cs_i = 1'b0; write = 1'b0;
  endtask

  task automatic bus_read(bit sel_out, output logic [31:0] d);
    @(negedge clk); cs_o = sel_out; cs_i = !sel_out; read = 1'b1;
    @(negedge clk); cs_o = 1'b0; cs_i = 1'b0; read = 1'b0;
    checks++;
    if ((sel_out ? rv_o : rv_i) !== 1'b1) failures++;
    d = sel_out ? rd_o : rd_i;
    @(negedge clk);
    checks++;
    if (rv_o !== 1'b0 || rv_i !== 1'b0) failures++;
  endtask

  initial begin
    logic [31:0] d, v;
    #12 rst_n = 1'b1;
    checks++; if (out_o !== 32'd320_000_000) failures++;
    bus_read(1'b1, d);
    checks++; if (d !== 32'd320_000_000) failures++;
    for (int i = 0; i < 50; i++) begin
      v = $urandom;
      bus_write(1'b1, v);
      checks++; if (out_o !== v) failures++;
      bus_read(1'b1, d);
      checks++; if (d !== v) failures++;
      in_i = $urandom;
      bus_write(1'b0, ~in_i);
      bus_read(1'b0, d);
      checks++; if (d !== in_i) failures++;
      checks++; if (out_o !== v) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
