// lfsr_prbg - pseudo-random bit generator, one bit per clock.
//
// A 31-bit Fibonacci linear-feedback shift register. Each rising edge of
// clk shifts the register one place left and feeds back the XNOR of
// stages 31 and 28 (polynomial x^31 + x^28 + 1, maximal length, period
// 2^31 - 1). The XNOR form makes the all-zero state, which is the reset
// state, part of the sequence; the all-ones state is the one it never
// reaches. The output bit is stage 31, so it changes just after each
// rising edge and is held for a whole clock period.
//
// The 31-bit length follows the tester; the tap pair is the well-known
// maximal-length pair for 31 stages and is this design's choice, as are
// the XNOR form and the asynchronous reset to zero.
module lfsr_prbg #(
  parameter int unsigned WIDTH = 31,
  parameter int unsigned TAP_A = 31,  // stage numbers, 1 = first stage
  parameter int unsigned TAP_B = 28
) (
  input  logic             clk,
  input  logic             rst_n,   // asynchronous, active low
  output logic             bit_out,
  output logic [WIDTH-1:0] state
);

  logic feedback;

  always_comb feedback = ~(state[TAP_A-1] ^ state[TAP_B-1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= '0;
    else        state <= {state[WIDTH-2:0], feedback};
  end

  assign bit_out = state[WIDTH-1];

endmodule
