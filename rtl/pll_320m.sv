// pll_320m - behavioural model of the clock-multiplying PLL.
//
// This is a simulation model, not synthesizable logic: on the FPGA the
// part is the vendor's PLL. It has the ports of that PLL (inclk0, areset,
// c0, locked) and multiplies the 48 MHz board clock by MUL / DIV = 20 / 3
// to 320 MHz, the figures the tester uses. The model does not track the
// input phase: after areset is released it counts LOCK_CYCLES rising
// edges of inclk0, then raises locked on the next one and starts c0 from
// that edge (first rising edge of c0 half a period later). While areset
// is high, c0 is low and locked is low. The output period is computed
// from IN_PERIOD_PS, MUL and DIV.
module pll_320m #(
  parameter real         IN_PERIOD_PS = 20833.333,  // 48 MHz
  parameter int unsigned MUL          = 20,
  parameter int unsigned DIV          = 3,
  parameter int unsigned LOCK_CYCLES  = 4
) (
  input  logic inclk0,
  input  logic areset,
  output logic c0,
  output logic locked
);

  timeunit 1ps;
  timeprecision 1fs;

  localparam real HALF_PS = IN_PERIOD_PS * DIV / (2.0 * MUL);

  int unsigned edges;

  initial begin
    c0     = 1'b0;
    locked = 1'b0;
    edges  = 0;
  end

  always @(posedge inclk0 or posedge areset) begin
    if (areset) begin
      edges  <= 0;
      locked <= 1'b0;
    end else if (edges < LOCK_CYCLES) begin
      edges <= edges + 1;
    end else begin
      locked <= 1'b1;
    end
  end

  always begin
    if (!locked || areset) begin
      c0 = 1'b0;
      @(posedge locked);
    end else begin
      #(HALF_PS) c0 = 1'b1;
      #(HALF_PS) c0 = 1'b0;
    end
  end

endmodule
