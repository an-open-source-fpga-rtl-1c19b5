// tb_os_bert_top - end-to-end test of the tester at its default sizes.
//
// The testbench plays the soft CPU: it drives the data master with bus
// reads and writes and runs measurements the way the firmware does
// (clear counters, set the data rate, run, stop, read the counters). The
// three data channels are looped back through short wires; the testbench
// flips chosen bits on each wire, keeps its own counts of bits sent and
// bits flipped, and compares them with the registers read over the bus.
// Measurements run at 10 MHz and at 1 MHz (the rate of the documented
// example), with the output switched off, with a delayed sampling clock,
// with errors on one or both differential conductors, and with the
// divider running from the external clock input. The RAM is
// written and read through both masters, and one byte goes each way
// through the UART at 9600 baud. Each mechanism is counted and
// one that never happened counts as a failure.
`timescale 1ns / 1ps
module tb_os_bert_top;
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
  always #4 ext_clk = ~ext_clk;  // 125 MHz external clock

  // channel wires: 3 ns, 5 ns and 2 ns long
  assign #3 wire_out[0] = data_out[0];
  assign #5 wire_out[1] = data_out[1];
  assign #2 wire_out[2] = data_out[2];
  assign data_in = wire_out ^ flip;

  // ------------------------------------------------ error injection model
  int flip_rate [3];         // flip one bit in flip_rate (0: never)
  int n_sent, n_flip0, n_flip_a, n_flip_b, n_flip_c;
  realtime last_rise, period;

  always @(posedge sync_out) begin
    period    = $realtime - last_rise;
    last_rise = $realtime;
    for (int c = 0; c < 3; c++)
      flip[c] <= flip_rate[c] != 0 && $urandom_range(0, flip_rate[c] - 1) == 0;
  end
  always @(negedge sync_out) begin
    n_sent++;
    if (flip[0]) n_flip0++;
    if (flip[1]) n_flip_a++;
    if (flip[2]) n_flip_b++;
    if (flip[1] || flip[2]) n_flip_c++;
  end

  // latency from the data-clock falling edge to the sampling edge
  realtime t_fall, sample_lat;
  always @(negedge sync_out) t_fall = $realtime;
  always @(posedge dut.sample_clk) sample_lat = $realtime - t_fall;

  // ---------------------------------------------------- mechanism counters
  int m_run, m_clear, m_rate_change, m_out_off, m_delay, m_err_a_only,
      m_err_b_only, m_err_both, m_ram, m_unmapped, m_stop_high, m_ext_clk,
      m_serial;
  bit use_ext = 1'b0;

  // ------------------------------------------------------------ bus tasks
  task automatic bus_write(logic [15:0] a, logic [31:0] d);
    @(negedge clk_48m);
    cpu_address = a; cpu_write = 1'b1; cpu_writedata = d;
    @(negedge clk_48m);
    cpu_write = 1'b0;
  endtask

  task automatic bus_read(logic [15:0] a, output logic [31:0] d);
    @(negedge clk_48m);
    cpu_address = a; cpu_read = 1'b1;
    @(negedge clk_48m);
    cpu_read = 1'b0;
    checks++;
    if (cpu_readdatavalid !== 1'b1) failures++;
    d = cpu_readdata;
  endtask

  function automatic logic [15:0] pio(pio_idx_e i);
    return PIO_BASE + 16'(4 * int'(i));
  endfunction

  task automatic expect_reg(pio_idx_e i, int exp, string what);
    logic [31:0] d;
    bus_read(pio(i), d);
    checks++;
    if (d !== 32'(exp)) begin
      failures++;
      $display("%s: %s = %0d, expected %0d", what, i.name(), d, exp);
    end
  endtask

  // One measurement: clear, run for n_bits data-clock periods, stop, read.
  task automatic measure(int rate_hz, int n_bits, int tap, bit out_on,
                         int r0, int ra, int rb, string what);
    logic [31:0] ctrl_on;
    ctrl_on = 32'(1 << CTRL_RUN) | (out_on ? 32'(1 << CTRL_OUT_EN) : 32'h0) |
              (use_ext ? 32'(1 << CTRL_EXT_CLK) : 32'h0);
    bus_write(pio(PIO_DESIRED_FREQ), 32'(rate_hz));
    bus_write(pio(PIO_SAMPLE_DELAY), 32'(tap));
    bus_write(pio(PIO_CONTROL), 32'(1 << CTRL_CNT_CLR));
    expect_reg(PIO_TOTAL_BITS, 0, {what, " after clear"});
    expect_reg(PIO_DIFF_TOTAL, 0, {what, " after clear"});
    m_clear++;
    flip_rate[0] = r0; flip_rate[1] = ra; flip_rate[2] = rb;
    n_sent = 0; n_flip0 = 0; n_flip_a = 0; n_flip_b = 0; n_flip_c = 0;
    bus_write(pio(PIO_CONTROL), ctrl_on & ~32'(1 << CTRL_RUN));
    bus_write(pio(PIO_CONTROL), ctrl_on);
    m_run++;
    wait (n_sent >= n_bits);
    // stop in the high phase of the data clock; the output stays on
    @(posedge sync_out); #20;
    bus_write(pio(PIO_CONTROL), ctrl_on & ~32'(1 << CTRL_RUN));
    if (sync_out) m_stop_high++;
    repeat (3) @(posedge clk_48m);
    // the high phase is completed, then the clock stops
    wait (sync_out == 1'b0);
    #(2.0e9 / rate_hz + 200.0);
    checks++;
    if (period < 1.0e9 / rate_hz - 4.0 || period > 1.0e9 / rate_hz + 4.0) begin
      failures++;
      $display("%s: data clock period %0.2f ns", what, period);
    end
    expect_reg(PIO_TOTAL_BITS, n_sent, what);
    expect_reg(PIO_DIFF_TOTAL, n_sent, what);
    if (out_on) begin
      expect_reg(PIO_WRONG_BITS, n_flip0, what);
      expect_reg(PIO_DIFF_ERR_A, n_flip_a, what);
      expect_reg(PIO_DIFF_ERR_B, n_flip_b, what);
      expect_reg(PIO_DIFF_ERR_C, n_flip_c, what);
    end else begin
      // nothing is sent: every 1 is wrong on A, every 0 on B
      logic [31:0] wa, wb, w0;
      bus_read(pio(PIO_DIFF_ERR_A), wa);
      bus_read(pio(PIO_DIFF_ERR_B), wb);
      bus_read(pio(PIO_WRONG_BITS), w0);
      checks += 3;
      if (wa + wb != 32'(n_sent) || wa == 0 || wb == 0) failures++;
      if (w0 != wa) failures++;
      expect_reg(PIO_DIFF_ERR_C, n_sent, what);
      bus_write(pio(PIO_CONTROL), 32'(1 << CTRL_OUT_EN));
      m_out_off++;
    end
    $display("%s: %0d bits, errors %0d / A %0d B %0d C %0d", what, n_sent,
             n_flip0, n_flip_a, n_flip_b, n_flip_c);
    // the sampling edge lags the data-clock falling edge by tap periods
    // of the 320 MHz delay-control clock, less the phase between them
    checks++;
    if (sample_lat < (tap - 1) * 3.125 - 0.01 || sample_lat > tap * 3.125 + 0.01) begin
      failures++;
      $display("%s: sampling edge %0.3f ns after the falling edge", what, sample_lat);
    end
    if (tap != 0) m_delay++;
    if (use_ext) m_ext_clk++;
    if (n_flip_a > 0 && n_flip_b == 0) m_err_a_only++;
    if (n_flip_b > 0 && n_flip_a == 0) m_err_b_only++;
    if (n_flip_a + n_flip_b > n_flip_c) m_err_both++;
  endtask

  // output gate: with the output off, all three outputs stay low
  always @(data_out) if (dut.out_en == 1'b0 && data_out != 3'b000) begin
    failures++;
    $display("data_out %b while the output is off", data_out);
  end


  // assert the asynchronous resets with an edge
  initial #1 begin rst_n = 1'b0; end
  // serial line model, 9600 baud 8N1
  localparam real BIT_NS = 1.0e9 / 9600;
  task automatic pc_send(logic [7:0] b);
    uart_rx = 1'b0; #(BIT_NS);
    for (int i = 0; i < 8; i++) begin uart_rx = b[i]; #(BIT_NS); end
    uart_rx = 1'b1; #(BIT_NS);
  endtask
  task automatic pc_receive(output logic [7:0] b);
    @(negedge uart_tx); #(BIT_NS * 1.5);
    for (int i = 0; i < 8; i++) begin b[i] = uart_tx; #(BIT_NS); end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    #100 rst_n = 1'b1;
    wait (pll_locked);
    checks++;
    expect_reg(PIO_INPUT_FREQ, 320_000_000, "reset value");
    expect_reg(PIO_DESIRED_FREQ, 1_000_000, "reset value");

    // RAM through the data master and the instruction master
    for (int i = 0; i < 16; i++) bus_write(16'(4 * i), 32'hC0DE_0000 + 32'(i));
    for (int i = 0; i < 16; i++) begin
      bus_read(16'(4 * i), d);
      checks++; if (d !== 32'hC0DE_0000 + 32'(i)) failures++;
      @(negedge clk_48m); cpu_i_read = 1'b1; cpu_i_address = 12'(i);
      @(negedge clk_48m); cpu_i_read = 1'b0;
      checks++;
      if (!cpu_i_readdatavalid || cpu_i_readdata !== 32'hC0DE_0000 + 32'(i)) failures++;
    end
    m_ram++;
    bus_read(16'h4000, d);
    checks++; if (d !== 0) failures++;
    m_unmapped++;

    // serial command: the PC sends 'h', the CPU takes it on the interrupt
    // and answers 'V' through the UART
    fork
      pc_send(8'h68);
      begin
        wait (cpu_irq);
        bus_read(16'h9000, d);
        checks++; if (d[7:0] !== 8'h68) failures++;
        checks++; #100; if (cpu_irq !== 1'b0) failures++;
        bus_write(16'h9004, 32'h56);
      end
      begin
        logic [7:0] reply;
        pc_receive(reply);
        checks++; if (reply !== 8'h56) failures++;
        else m_serial++;
      end
    join

    measure(10_000_000, 600, 0, 1'b1, 8, 6, 0,  "10 Mb/s, errors on A");
    m_rate_change++;
    measure(1_000_000, 150, 0, 1'b1, 5, 0, 4,   "1 Mb/s, errors on B");
    measure(10_000_000, 600, 9, 1'b1, 7, 5, 5,  "10 Mb/s, sample delay 9");
    m_rate_change++;
    measure(8_000_000, 300, 0, 1'b0, 0, 0, 0,   "8 Mb/s, output off");
    // external 125 MHz clock: 5 Mb/s is 12.5 external cycles per half bit
    bus_write(pio(PIO_INPUT_FREQ), 32'd125_000_000);
    use_ext = 1'b1;
    measure(5_000_000, 400, 0, 1'b1, 6, 9, 9,   "5 Mb/s from the external clock");
    use_ext = 1'b0;
    bus_write(pio(PIO_CONTROL), 32'h0);
    bus_write(pio(PIO_INPUT_FREQ), 32'd320_000_000);

    // every mechanism must have happened
    begin
      int m [13];
      m = '{m_run, m_clear, m_rate_change, m_out_off, m_delay, m_err_a_only,
            m_err_b_only, m_err_both, m_ram, m_unmapped, m_stop_high, m_ext_clk,
            m_serial};
      foreach (m[k]) begin
        checks++;
        if (m[k] == 0) begin failures++; $display("mechanism %0d never happened", k); end
      end
    end
    $display("runs %0d clears %0d rate changes %0d output off %0d delayed %0d A-only %0d B-only %0d both %0d external clock %0d",
             m_run, m_clear, m_rate_change, m_out_off, m_delay, m_err_a_only,
             m_err_b_only, m_err_both, m_ext_clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
