// onchip_memory - the soft CPU's on-chip RAM, 16 kB by default.
//
// A RAM of 32-bit words with two ports, both clocked by clk. Port 1
// serves the CPU's data master: it writes the whole word when
// chipselect and write are high and returns the addressed word one clock
// after a read (readdatavalid). Port 2 serves the instruction master and
// only reads, also with one clock of latency. Addresses are word
// addresses. The size follows the tester; the two ports, the word width,
// the full-word writes and the latency are this design's choices. The
// contents are not initialised: the program is loaded over the bus.
module onchip_memory #(
  parameter int unsigned BYTES  = 16384,
  localparam int unsigned WORDS  = BYTES / 4,
  localparam int unsigned ADDR_W = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // data master port
  input  logic              chipselect,
  input  logic              read,
  input  logic              write,
  input  logic [ADDR_W-1:0] address,
  input  logic [31:0]       writedata,
  output logic [31:0]       readdata,
  output logic              readdatavalid,
  // instruction master port
  input  logic              i_read,
  input  logic [ADDR_W-1:0] i_address,
  output logic [31:0]       i_readdata,
  output logic              i_readdatavalid
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (chipselect && write) mem[address] <= writedata;
    readdata   <= mem[address];
    i_readdata <= mem[i_address];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      readdatavalid   <= 1'b0;
      i_readdatavalid <= 1'b0;
    end else begin
      readdatavalid   <= chipselect && read;
      i_readdatavalid <= i_read;
    end
  end

  a_no_read_and_write: assert property (
    @(posedge clk) disable iff (!rst_n) chipselect |-> !(read && write));

endmodule
