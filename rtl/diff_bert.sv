// diff_bert - BERT channel pair for a differential link.
//
// One PRBS generator drives both conductors: data_out_a carries the
// generator's bit and data_out_b its complement, so that an external
// level shifter can turn the pair into a differential signal (CAN,
// RS422, ...). The two returning bits are each XORed with the bit
// expected on their conductor. On each rising edge of sample_clk:
//   incorrect_a counts errors on conductor A,
//   incorrect_b counts errors on conductor B,
//   incorrect_c counts samples in which either conductor was wrong
//               (the OR of the two comparisons),
//   total_bits  counts every sample.
// This follows the tester's differential module. Which conductor carries
// the inverted stream, the shared out_en gate and the asynchronous clear
// are this design's choices.
module diff_bert #(
  parameter int unsigned LFSR_WIDTH = 31,
  parameter int unsigned CNT_WIDTH  = 32
) (
  input  logic                 data_clk,
  input  logic                 sample_clk,
  input  logic                 rst_n,
  input  logic                 cnt_clr,
  input  logic                 out_en,
  output logic                 data_out_a,
  output logic                 data_out_b,
  input  logic                 data_in_a,
  input  logic                 data_in_b,
  output logic [CNT_WIDTH-1:0] incorrect_a,
  output logic [CNT_WIDTH-1:0] incorrect_b,
  output logic [CNT_WIDTH-1:0] incorrect_c,
  output logic [CNT_WIDTH-1:0] total_bits
);

  logic                  prbs_bit;
  logic                  err_a, err_b, err_c;

  lfsr_prbg #(.WIDTH(LFSR_WIDTH)) u_prbg (
    .clk     (data_clk),
    .rst_n   (rst_n),
    .bit_out (prbs_bit),
    .state   ()
  );

  assign data_out_a = prbs_bit & out_en;
  assign data_out_b = ~prbs_bit & out_en;

  always_comb begin
    err_a = data_in_a ^ prbs_bit;
    err_b = data_in_b ^ ~prbs_bit;
    err_c = err_a | err_b;
  end

  bit_counter #(.WIDTH(CNT_WIDTH)) u_cnt_a (
    .clk(sample_clk), .clr(cnt_clr), .inc(err_a), .count(incorrect_a));
  bit_counter #(.WIDTH(CNT_WIDTH)) u_cnt_b (
    .clk(sample_clk), .clr(cnt_clr), .inc(err_b), .count(incorrect_b));
  bit_counter #(.WIDTH(CNT_WIDTH)) u_cnt_c (
    .clk(sample_clk), .clr(cnt_clr), .inc(err_c), .count(incorrect_c));
  bit_counter #(.WIDTH(CNT_WIDTH)) u_total (
    .clk(sample_clk), .clr(cnt_clr), .inc(1'b1), .count(total_bits));

endmodule
