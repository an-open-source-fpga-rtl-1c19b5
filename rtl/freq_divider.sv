// freq_divider - data-rate clock generator.
//
// Turns the fast PLL clock (clk, 320 MHz in the tester) into the data
// clock clk_out at the rate the CPU asks for. The CPU writes two numbers
// in hertz: input_freq, the frequency of clk, and desired_freq, the data
// rate. Each clk cycle a phase accumulator adds 2 * desired_freq; each
// time it reaches input_freq it wraps by input_freq and clk_out toggles.
// The output thus has exactly desired_freq on average, and exactly a
// constant period when input_freq / (2 * desired_freq) is a whole number
// (for example 160 clk cycles per half period at 1 MHz from 320 MHz);
// otherwise a half period is the neighbouring whole number of clk cycles.
// No divider is needed. The highest rate is input_freq / 2: a larger
// desired_freq toggles every cycle.
//
// run, written by the CPU in another clock domain, passes through a
// two-flop synchroniser. The output starts low and its first rising edge
// comes one half period after run is seen. When run drops, the output
// finishes its high phase, so the last bit sent is also sampled, and
// then stays low.
//
// Dividing by a frequency given in hertz follows the tester's 'freq'
// command and its input/desired frequency registers; the accumulator
// method and the stop behaviour are this design's choices.
module freq_divider #(
  parameter int unsigned FREQ_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,         // async, active low
  input  logic              run,           // asynchronous to clk
  input  logic [FREQ_W-1:0] input_freq,    // Hz, static while running
  input  logic [FREQ_W-1:0] desired_freq,  // Hz, static while running
  output logic              clk_out
);

  localparam int unsigned ACC_W = FREQ_W + 2;

  logic [1:0]       run_sync;
  logic [ACC_W-1:0] acc, acc_sum, step, limit;
  logic             active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) run_sync <= '0;
    else        run_sync <= {run_sync[0], run};
  end

  always_comb begin
    step    = {1'b0, desired_freq, 1'b0};
    limit   = {2'b00, input_freq};
    acc_sum = acc + step;
    active  = run_sync[1] || clk_out;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      clk_out <= 1'b0;
    end else if (!active) begin
      acc     <= '0;
      clk_out <= 1'b0;
    end else if (step >= limit) begin
      acc     <= '0;
      clk_out <= ~clk_out;
    end else if (acc_sum >= limit) begin
      acc     <= acc_sum - limit;
      clk_out <= ~clk_out;
    end else begin
      acc     <= acc_sum;
    end
  end

endmodule
