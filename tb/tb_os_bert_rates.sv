// tb_os_bert_rates - the tester at the data rates it is specified for:
// 0.5 and 1 Mb/s (the rates of the documented scope captures), 50 Mb/s
// (the specified maximum) and 75 Mb/s (the highest rate demonstrated on
// the board). For each rate the testbench, acting as the processor,
// clears the counters, runs a short measurement with random bit flips on
// all three looped-back channels and checks the counters and the average
// data-clock period. The top is used at its default sizes.
`timescale 1ns / 1ps
module tb_os_bert_rates;
  import os_bert_pkg::*;

  logic        clk_48m = 1'b0, rst_n = 1'b1;
  logic [15:0] cpu_address = '0;
  logic        cpu_read = 1'b0, cpu_write = 1'b0;
  logic [31:0] cpu_writedata = '0, cpu_readdata;
  logic        cpu_readdatavalid;
  logic        cpu_i_read = 1'b0;
  logic [11:0] cpu_i_address = '0;
  logic [31:0] cpu_i_readdata;
  logic        cpu_i_readdatavalid;
  logic [2:0]  data_out, data_in, wire_out;
  logic [2:0]  flip = '0;
  logic        sync_out, pll_locked;
  logic        ext_clk = 1'b0;
  logic        cpu_irq, uart_rx = 1'b1, uart_tx;

  int checks = 0, failures = 0;

  os_bert_top dut (.*);

  always #10.41667 clk_48m = ~clk_48m;

  // 1 ns wires: shorter than half a bit at 75 Mb/s
  assign #1 wire_out = data_out;
  assign data_in = wire_out ^ flip;

  int n_sent, n_flip0, n_flip_a, n_flip_b, n_flip_c, n_rise;
  realtime first_rise, last_rise;

  always @(posedge sync_out) begin
    if (n_rise == 0) first_rise = $realtime;
    last_rise = $realtime;
    n_rise++;
    for (int c = 0; c < 3; c++) flip[c] <= ($urandom_range(0, 6) == 0);
  end
  always @(negedge sync_out) begin
    n_sent++;
    if (flip[0]) n_flip0++;
    if (flip[1]) n_flip_a++;
    if (flip[2]) n_flip_b++;
    if (flip[1] || flip[2]) n_flip_c++;
  end

  task automatic bus_write(pio_idx_e i, logic [31:0] d);
    @(negedge clk_48m);
    cpu_address = PIO_BASE + 16'(4 * int'(i)); cpu_write = 1'b1; cpu_writedata = d;
    @(negedge clk_48m);
    cpu_write = 1'b0;
  endtask

  task automatic expect_reg(pio_idx_e i, int exp, int rate);
    @(negedge clk_48m);
    cpu_address = PIO_BASE + 16'(4 * int'(i)); cpu_read = 1'b1;
    @(negedge clk_48m);
    cpu_read = 1'b0;
    checks++;
    if (!cpu_readdatavalid || cpu_readdata !== 32'(exp)) begin
      failures++;
      $display("%0d b/s: %s = %0d, expected %0d", rate, i.name(), cpu_readdata, exp);
    end
  endtask

  task automatic measure(int rate, int n_bits);
    real avg;
    bus_write(PIO_DESIRED_FREQ, 32'(rate));
    bus_write(PIO_CONTROL, 32'(1 << CTRL_CNT_CLR));
    bus_write(PIO_CONTROL, 32'(1 << CTRL_OUT_EN));
    n_sent = 0; n_flip0 = 0; n_flip_a = 0; n_flip_b = 0; n_flip_c = 0; n_rise = 0;
    bus_write(PIO_CONTROL, 32'(1 << CTRL_OUT_EN) | 32'(1 << CTRL_RUN));
    wait (n_sent >= n_bits);
    bus_write(PIO_CONTROL, 32'(1 << CTRL_OUT_EN));
    #(3.0e9 / rate + 300.0);
    avg = (last_rise - first_rise) / (n_rise - 1);
    checks++;
    if (avg < 1.0e9 / rate * 0.995 || avg > 1.0e9 / rate * 1.005) begin
      failures++;
      $display("%0d b/s: average period %0.3f ns", rate, avg);
    end
    expect_reg(PIO_TOTAL_BITS, n_sent, rate);
    expect_reg(PIO_WRONG_BITS, n_flip0, rate);
    expect_reg(PIO_DIFF_ERR_A, n_flip_a, rate);
    expect_reg(PIO_DIFF_ERR_B, n_flip_b, rate);
    expect_reg(PIO_DIFF_ERR_C, n_flip_c, rate);
    expect_reg(PIO_DIFF_TOTAL, n_sent, rate);
    $display("%0d b/s: %0d bits, %0d errors, average period %0.3f ns",
             rate, n_sent, n_flip0, avg);
  endtask

  initial begin
    #3_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    wait (pll_locked);
    measure(500_000, 120);
    measure(1_000_000, 200);
    measure(50_000_000, 3000);
    measure(75_000_000, 3000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
