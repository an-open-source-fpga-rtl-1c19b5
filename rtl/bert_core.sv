// bert_core - the bit error ratio tester channel.
//
// The PRBS generator (lfsr_prbg) produces one bit per rising edge of
// data_clk. That bit leaves the chip on data_out (the victim channel)
// and comes back, possibly disturbed, on data_in. On each rising edge of
// sample_clk the received bit is XORed with the known-good bit still held
// by the generator: the total-bits register counts every sample and the
// incorrect-bits register counts every mismatch, so BER = incorrect /
// total. With sample_clk = ~data_clk the sample falls in the middle of
// each bit, as in the tester; a delayed sampling clock (sample_delay) can
// be used instead. The sampling point must stay before the next rising
// edge of data_clk, or the received bit is compared with the next one.
//
// out_en gates data_out to zero (the 'outon'/'outoff' commands); the
// comparison always uses the generator's bit. cnt_clr clears both
// registers asynchronously. The gating and the clear are this design's
// choices; the generator, XOR and two registers follow the tester.
module bert_core #(
  parameter int unsigned LFSR_WIDTH = 31,
  parameter int unsigned CNT_WIDTH  = 32
) (
  input  logic                 data_clk,   // data-rate clock
  input  logic                 sample_clk, // sampling clock
  input  logic                 rst_n,      // generator reset, async
  input  logic                 cnt_clr,    // counter clear, async
  input  logic                 out_en,
  output logic                 data_out,
  input  logic                 data_in,
  output logic [CNT_WIDTH-1:0] incorrect_bits,
  output logic [CNT_WIDTH-1:0] total_bits
);

  logic                  prbs_bit;
  logic                  bit_error;

  lfsr_prbg #(.WIDTH(LFSR_WIDTH)) u_prbg (
    .clk     (data_clk),
    .rst_n   (rst_n),
    .bit_out (prbs_bit),
    .state   ()
  );

  assign data_out = prbs_bit & out_en;

  always_comb bit_error = data_in ^ prbs_bit;

  bit_counter #(.WIDTH(CNT_WIDTH)) u_incorrect (
    .clk   (sample_clk),
    .clr   (cnt_clr),
    .inc   (bit_error),
    .count (incorrect_bits)
  );

  bit_counter #(.WIDTH(CNT_WIDTH)) u_total (
    .clk   (sample_clk),
    .clr   (cnt_clr),
    .inc   (1'b1),
    .count (total_bits)
  );

endmodule
