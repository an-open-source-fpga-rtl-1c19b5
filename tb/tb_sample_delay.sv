// tb_sample_delay - a 10 ns delay-control clock and a slow sampling clock
// whose edges fall 5 ns after a delay-control edge. For every tap the
// delay from an input edge to the output edge must be n*10 - 5 ns (tap 0:
// no delay), and every tap output must carry the same waveform.
`timescale 1ns / 1ps
module tb_sample_delay;
  localparam int N = 16;
  logic dly_clk = 1'b0, rst_n = 1'b1, sin = 1'b0, sout;
  logic [4:0] tap_sel = '0;
  logic [N:1] taps;
  int checks = 0, failures = 0;
  realtime t_in, t_out;

  sample_delay #(.N_TAPS(N)) dut (
    .dly_clk(dly_clk), .rst_n(rst_n), .sample_clk_in(sin),
    .tap_sel(tap_sel), .taps(taps), .sample_clk_out(sout));

  always #5 dly_clk = ~dly_clk;


  // assert the asynchronous resets with an edge
  initial #1 begin rst_n = 1'b0; end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #22 rst_n = 1'b1;
    for (int n = 0; n <= N; n++) begin
      tap_sel = 5'(n);
      // input rises at 5 ns after a delay-control rising edge
      @(posedge dly_clk); #5;
      sin = 1'b1; t_in = $realtime;
      @(posedge sout); t_out = $realtime;
      checks++;
      if (n == 0 ? (t_out - t_in > 0.01) :
          (t_out - t_in < n * 10.0 - 5.01 || t_out - t_in > n * 10.0 - 4.99)) begin
        failures++;
        $display("tap %0d: delay %0.3f ns", n, t_out - t_in);
      end
      repeat (N + 2) @(posedge dly_clk);
      checks++; if (taps !== '1) failures++;
      #5 sin = 1'b0;
      repeat (N + 2) @(posedge dly_clk);
      checks++; if (taps !== '0 || sout !== 1'b0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
