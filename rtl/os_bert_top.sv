// os_bert_top - FPGA top level of the open bit error ratio tester.
//
// Three data channels leave and re-enter the FPGA. Channel 0 is a
// standard BERT channel (bert_core): a PRBS goes out, the returning bits
// are compared with it and the incorrect and total bits are counted.
// Channels 1 and 2 form the conductors A and B of a differential BERT
// (diff_bert), which counts errors per conductor and for the pair.
//
// Clocking: the 48 MHz board clock runs the CPU bus and the PIO
// registers and feeds the PLL, which makes 320 MHz. The frequency
// divider turns 320 MHz into the data clock at the rate the CPU set, and
// only while the CPU lets it run; the data clock is also brought out on
// sync_out. Both BERT channels transmit on its rising edge. The sampling
// clock is the inverted data clock, so bits are sampled mid-bit, and can
// be delayed in steps of one 320 MHz period by the sampling-delay chain.
// Instead of the PLL clock, the divider can run from the external clock
// input ext_clk (control bit CTRL_EXT_CLK); the CPU then writes the
// frequency of that clock to the input-frequency register. The select is
// a plain multiplexer and may only change while the divider is stopped.
//
// The soft CPU is not part of this module: its data master, instruction
// master and interrupt are ports. Through the data master the CPU reaches
// the 16 kB on-chip RAM (byte address 0x0000), the PIO registers (byte
// address 0x8000 + 4*index, see os_bert_pkg) and the 9600 baud UART to
// the PC (byte address 0x9000). A
// measurement is: set CTRL_CNT_CLR, clear it, set CTRL_RUN, wait, clear
// CTRL_RUN, wait a few data-clock periods, read the counters.
//
// The split into PLL, divider, BERT module and CPU with one PIO per
// parameter follows the tester, as do one configurable external clock
// input and the input-frequency register that goes with it. Using the
// three channels this way, the clock multiplexer, the register map and
// the resets are this design's choices.
module os_bert_top
  import os_bert_pkg::*;
#(
  parameter int unsigned N_DELAY_TAPS = 16,
  parameter int unsigned RAM_SIZE     = RAM_BYTES,
  localparam int unsigned RAM_ADDR_W  = $clog2(RAM_SIZE / 4)
) (
  input  logic                  clk_48m,
  input  logic                  rst_n,            // board reset, async
  input  logic                  ext_clk,          // external clock input
  // CPU data master
  input  logic [AV_ADDR_W-1:0]  cpu_address,      // byte address
  input  logic                  cpu_read,
  input  logic                  cpu_write,
  input  logic [31:0]           cpu_writedata,
  output logic [31:0]           cpu_readdata,
  output logic                  cpu_readdatavalid,
  // CPU instruction master
  input  logic                  cpu_i_read,
  input  logic [RAM_ADDR_W-1:0] cpu_i_address,    // word address
  output logic [31:0]           cpu_i_readdata,
  output logic                  cpu_i_readdatavalid,
  output logic                  cpu_irq,          // UART receive interrupt
  // serial port to the PC
  input  logic                  uart_rx,
  output logic                  uart_tx,
  // serial data channels: 0 standard, 1 = A and 2 = B differential
  output logic [2:0]            data_out,
  input  logic [2:0]            data_in,
  output logic                  sync_out,         // data clock
  output logic                  pll_locked
);

  localparam int unsigned SEL_W = $clog2(N_DELAY_TAPS + 1);

  // ---------------------------------------------------------------- clocks
  logic clk_320m;
  logic data_clk;
  logic sample_clk;
  logic [N_DELAY_TAPS:1] delay_taps;

  pll_320m u_pll (
    .inclk0 (clk_48m),
    .areset (!rst_n),
    .c0     (clk_320m),
    .locked (pll_locked)
  );

  // --------------------------------------------------------------- CPU bus
  av_req_t     m_req;
  av_rsp_t     m_rsp;
  logic        ram_cs;
  av_rsp_t     ram_rsp;
  logic [N_PIO-1:0] pio_cs;
  av_rsp_t     pio_rsp [N_PIO];
  logic        uart_cs;
  av_rsp_t     uart_rsp;
  logic [31:0] pio_in  [N_PIO];
  logic [31:0] pio_out [N_PIO];

  always_comb begin
    m_req.address   = cpu_address;
    m_req.read      = cpu_read;
    m_req.write     = cpu_write;
    m_req.writedata = cpu_writedata;
    cpu_readdata      = m_rsp.readdata;
    cpu_readdatavalid = m_rsp.readdatavalid;
  end

  avalon_interconnect #(.N_PIOS(N_PIO)) u_bus (
    .clk     (clk_48m),
    .rst_n   (rst_n),
    .m_req   (m_req),
    .m_rsp   (m_rsp),
    .ram_cs  (ram_cs),
    .ram_rsp (ram_rsp),
    .pio_cs  (pio_cs),
    .pio_rsp (pio_rsp),
    .uart_cs (uart_cs),
    .uart_rsp(uart_rsp)
  );

  uart u_uart (
    .clk           (clk_48m),
    .rst_n         (rst_n),
    .chipselect    (uart_cs),
    .read          (cpu_read),
    .write         (cpu_write),
    .address       (cpu_address[3:2]),
    .writedata     (cpu_writedata),
    .readdata      (uart_rsp.readdata),
    .readdatavalid (uart_rsp.readdatavalid),
    .irq           (cpu_irq),
    .rx            (uart_rx),
    .tx            (uart_tx)
  );

  onchip_memory #(.BYTES(RAM_SIZE)) u_ram (
    .clk             (clk_48m),
    .rst_n           (rst_n),
    .chipselect      (ram_cs),
    .read            (cpu_read),
    .write           (cpu_write),
    .address         (cpu_address[RAM_ADDR_W+1:2]),
    .writedata       (cpu_writedata),
    .readdata        (ram_rsp.readdata),
    .readdatavalid   (ram_rsp.readdatavalid),
    .i_read          (cpu_i_read),
    .i_address       (cpu_i_address),
    .i_readdata      (cpu_i_readdata),
    .i_readdatavalid (cpu_i_readdatavalid)
  );

  // One PIO per parameter; which are outputs and their reset values.
  function automatic bit pio_is_output(int unsigned i);
    return i inside {int'(PIO_CONTROL), int'(PIO_DESIRED_FREQ),
                     int'(PIO_INPUT_FREQ), int'(PIO_SAMPLE_DELAY)};
  endfunction

  function automatic logic [31:0] pio_reset(int unsigned i);
    case (i)
      int'(PIO_DESIRED_FREQ): return DESIRED_FREQ_RESET;
      int'(PIO_INPUT_FREQ):   return INPUT_FREQ_RESET;
      default:          return '0;
    endcase
  endfunction

  for (genvar i = 0; i < N_PIO; i++) begin : g_pio
    avalon_pio #(
      .WIDTH       (32),
      .IS_OUTPUT   (pio_is_output(i)),
      .RESET_VALUE (pio_reset(i))
    ) u_pio (
      .clk           (clk_48m),
      .rst_n         (rst_n),
      .chipselect    (pio_cs[i]),
      .read          (cpu_read),
      .write         (cpu_write),
      .writedata     (cpu_writedata),
      .readdata      (pio_rsp[i].readdata),
      .readdatavalid (pio_rsp[i].readdatavalid),
      .in_port       (pio_in[i]),
      .out_port      (pio_out[i])
    );
  end

  logic [31:0] control;
  logic        run, cnt_clr, out_en, use_ext_clk;
  logic        div_clk;
  logic [SEL_W-1:0] tap_sel;

  always_comb begin
    control = pio_out[PIO_CONTROL];
    run     = control[CTRL_RUN];
    cnt_clr = control[CTRL_CNT_CLR] || !rst_n;
    out_en  = control[CTRL_OUT_EN];
    use_ext_clk = control[CTRL_EXT_CLK];
    tap_sel = pio_out[PIO_SAMPLE_DELAY][SEL_W-1:0];
  end

  // ------------------------------------------------------ data-rate clock
  // Divider input: the PLL clock or the external clock input. Switch only
  // while the divider is stopped; INPUT_FREQ must give its frequency.
  always_comb div_clk = use_ext_clk ? ext_clk : clk_320m;

  freq_divider u_div (
    .clk          (div_clk),
    .rst_n        (rst_n),
    .run          (run),
    .input_freq   (pio_out[PIO_INPUT_FREQ]),
    .desired_freq (pio_out[PIO_DESIRED_FREQ]),
    .clk_out      (data_clk)
  );

  assign sync_out = data_clk;

  sample_delay #(.N_TAPS(N_DELAY_TAPS)) u_delay (
    .dly_clk        (clk_320m),
    .rst_n          (rst_n),
    .sample_clk_in  (!data_clk),
    .tap_sel        (tap_sel),
    .taps           (delay_taps),
    .sample_clk_out (sample_clk)
  );

  // ---------------------------------------------------------- BERT channels
  logic [31:0] std_incorrect, std_total;
  logic [31:0] diff_err_a, diff_err_b, diff_err_c, diff_total;

  bert_core u_bert (
    .data_clk       (data_clk),
    .sample_clk     (sample_clk),
    .rst_n          (rst_n),
    .cnt_clr        (cnt_clr),
    .out_en         (out_en),
    .data_out       (data_out[0]),
    .data_in        (data_in[0]),
    .incorrect_bits (std_incorrect),
    .total_bits     (std_total)
  );

  diff_bert u_diff (
    .data_clk    (data_clk),
    .sample_clk  (sample_clk),
    .rst_n       (rst_n),
    .cnt_clr     (cnt_clr),
    .out_en      (out_en),
    .data_out_a  (data_out[1]),
    .data_out_b  (data_out[2]),
    .data_in_a   (data_in[1]),
    .data_in_b   (data_in[2]),
    .incorrect_a (diff_err_a),
    .incorrect_b (diff_err_b),
    .incorrect_c (diff_err_c),
    .total_bits  (diff_total)
  );

  always_comb begin
    for (int i = 0; i < int'(N_PIO); i++) pio_in[i] = '0;
    pio_in[PIO_WRONG_BITS] = std_incorrect;
    pio_in[PIO_TOTAL_BITS] = std_total;
    pio_in[PIO_DIFF_ERR_A] = diff_err_a;
    pio_in[PIO_DIFF_ERR_B] = diff_err_b;
    pio_in[PIO_DIFF_ERR_C] = diff_err_c;
    pio_in[PIO_DIFF_TOTAL] = diff_total;
  end

endmodule
