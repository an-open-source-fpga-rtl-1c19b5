// os_bert_pkg - types and constants shared by the BERT modules.
//
// The soft CPU reaches every measurement parameter through its own
// memory-mapped parallel I/O (PIO) register, one register per parameter,
// as in the CPU subsystem of the tester. The bus is a simple Avalon-MM
// style bus with a fixed read latency of one clock. The address map, the
// register order and the bits of the control register are this design's
// own choice; the set of registers (wrong bits, total bits, control
// frequency, desired frequency, input frequency) follows the tester.
// Two further registers serve the sampling-delay and differential
// extensions.
package os_bert_pkg;

  localparam int unsigned AV_ADDR_W = 16;  // byte address
  localparam int unsigned AV_DATA_W = 32;

  // Data-master request as seen by the slaves.
  typedef struct packed {
    logic [AV_ADDR_W-1:0] address;
    logic                 read;
    logic                 write;
    logic [AV_DATA_W-1:0] writedata;
  } av_req_t;

  // Response: read data valid one clock after the read.
  typedef struct packed {
    logic [AV_DATA_W-1:0] readdata;
    logic                 readdatavalid;
  } av_rsp_t;

  // On-chip RAM: 16 kB at byte address 0x0000.
  localparam int unsigned RAM_BYTES = 16384;
  localparam logic [AV_ADDR_W-1:0] RAM_BASE = 16'h0000;

  // PIO registers: one 32-bit word each from byte address 0x8000.
  localparam logic [AV_ADDR_W-1:0] PIO_BASE = 16'h8000;

  // UART: three word registers from byte address 0x9000 (see uart).
  localparam logic [AV_ADDR_W-1:0] UART_BASE  = 16'h9000;
  localparam int unsigned          UART_BYTES = 16;

  typedef enum logic [3:0] {
    PIO_WRONG_BITS   = 4'd0,  // in : incorrect bits, standard channel
    PIO_TOTAL_BITS   = 4'd1,  // in : total bits, standard channel
    PIO_CONTROL      = 4'd2,  // out: control bits, see CTRL_*
    PIO_DESIRED_FREQ = 4'd3,  // out: data rate in Hz
    PIO_INPUT_FREQ   = 4'd4,  // out: divider input clock in Hz
    PIO_SAMPLE_DELAY = 4'd5,  // out: sampling-clock delay tap
    PIO_DIFF_ERR_A   = 4'd6,  // in : differential, errors on conductor A
    PIO_DIFF_ERR_B   = 4'd7,  // in : differential, errors on conductor B
    PIO_DIFF_ERR_C   = 4'd8,  // in : differential, errors on A or B
    PIO_DIFF_TOTAL   = 4'd9   // in : differential, total bits
  } pio_idx_e;

  localparam int unsigned N_PIO = 10;

  // Bits of the control register.
  localparam int unsigned CTRL_RUN     = 0;  // enable the divider output
  localparam int unsigned CTRL_CNT_CLR = 1;  // hold all bit counters at zero
  localparam int unsigned CTRL_OUT_EN  = 2;  // drive the data outputs
  localparam int unsigned CTRL_EXT_CLK = 3;  // divider runs from ext_clk

  // Reset values of the frequency registers.
  localparam logic [31:0] INPUT_FREQ_RESET   = 32'd320_000_000;
  localparam logic [31:0] DESIRED_FREQ_RESET = 32'd1_000_000;

endpackage
