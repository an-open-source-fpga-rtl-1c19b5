// avalon_pio - one memory-mapped parallel I/O register.
//
// The tester gives every measurement parameter its own PIO so the CPU
// reads or writes it directly. An output PIO (IS_OUTPUT = 1) holds a
// register that the CPU writes and reads back and that drives out_port;
// it resets to RESET_VALUE. An input PIO (IS_OUTPUT = 0) returns in_port
// when read and ignores writes; in_port is read without a synchroniser,
// as the count registers it watches are static whenever the CPU reads
// them. The slave is selected by chipselect; read data appear on
// readdata, with readdatavalid high, one clock after the read.
// Register width and reset values follow this design's register map.
module avalon_pio #(
  parameter int unsigned WIDTH       = 32,
  parameter bit          IS_OUTPUT   = 1'b1,
  parameter logic [31:0] RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             chipselect,
  input  logic             read,
  input  logic             write,
  input  logic [31:0]      writedata,
  output logic [31:0]      readdata,
  output logic             readdatavalid,
  input  logic [WIDTH-1:0] in_port,
  output logic [WIDTH-1:0] out_port
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_port      <= IS_OUTPUT ? RESET_VALUE[WIDTH-1:0] : '0;
      readdata      <= '0;
      readdatavalid <= 1'b0;
    end else begin
      if (IS_OUTPUT && chipselect && write) out_port <= writedata[WIDTH-1:0];
      readdatavalid <= chipselect && read;
      if (chipselect && read)
        readdata <= 32'(IS_OUTPUT ? out_port : in_port);
    end
  end

  property p_no_read_and_write;
    @(posedge clk) disable iff (!rst_n) chipselect |-> !(read && write);
  endproperty
  a_no_read_and_write: assert property (p_no_read_and_write);

endmodule
