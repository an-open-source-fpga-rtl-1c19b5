// bit_counter - one bit-count register of the tester (incorrect bits or
// total bits).
//
// On each rising edge of clk, the sampling clock, the count grows by one
// when inc is high. clr clears it asynchronously: the CPU clears the
// registers while the sampling clock is stopped, so the clear cannot
// wait for a clock edge. The count is 32 bits wide, as in the tester, and
// wraps past 2^32 - 1; the CPU reads it while the sampling clock is
// stopped, so no synchroniser is needed on the read side.
module bit_counter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             clr,     // asynchronous, active high
  input  logic             inc,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk or posedge clr) begin
    if (clr)      count <= '0;
    else if (inc) count <= count + WIDTH'(1);
  end

endmodule
