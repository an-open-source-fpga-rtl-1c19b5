// sample_delay - re-configurable sampling-clock delay.
//
// The sampling clock is passed down a chain of N_TAPS D flip-flops, all
// clocked by the much faster delay-control clock dly_clk. The output of
// flip-flop n is the sampling clock delayed by n periods of dly_clk
// (plus the phase between the two clocks, less than one period).
// tap_sel picks the tap that drives sample_clk_out; tap_sel = 0 passes
// the sampling clock straight through, so with the tap at zero the
// counters sample exactly as without this module. All taps are also
// brought out on taps[]. Change tap_sel only while the sampling clock is
// stopped, or the selected clock may glitch.
//
// The flip-flop chain follows the tester's delay module. The tap
// multiplexer, the bypass at tap 0, the reset and the default of 16
// stages are this design's choices.
module sample_delay #(
  parameter int unsigned N_TAPS = 16,
  localparam int unsigned SEL_W = $clog2(N_TAPS + 1)
) (
  input  logic              dly_clk,
  input  logic              rst_n,          // async, clears the chain
  input  logic              sample_clk_in,
  input  logic [SEL_W-1:0]  tap_sel,        // 0 .. N_TAPS
  output logic [N_TAPS:1]   taps,
  output logic              sample_clk_out
);

  always_ff @(posedge dly_clk or negedge rst_n) begin
    if (!rst_n) taps <= '0;
    else        taps <= {taps[N_TAPS-1:1], sample_clk_in};
  end

  always_comb begin
    if (tap_sel == '0)                  sample_clk_out = sample_clk_in;
    else if (tap_sel > SEL_W'(N_TAPS)) sample_clk_out = taps[N_TAPS];
    else                                sample_clk_out = taps[tap_sel];
  end

endmodule
