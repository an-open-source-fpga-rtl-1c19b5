// avalon_interconnect - address decoder for the CPU data master.
//
// Selects one slave from the byte address of the request: the on-chip
// RAM for addresses below RAM_BASE + RAM_BYTES, PIO i for the word at
// PIO_BASE + 4*i (i < N_PIO), or the UART for its 16 bytes at UART_BASE. It forwards read, write and write data to
// all slaves, raises the chipselect of the chosen one, and passes back
// the read data of whichever slave signals readdatavalid. A read of an
// address that no slave decodes returns zero one clock later, so the
// master never waits forever. The address map is this design's own.
module avalon_interconnect
  import os_bert_pkg::*;
#(
  parameter int unsigned N_PIOS = N_PIO
) (
  input  logic             clk,
  input  logic             rst_n,
  input  av_req_t          m_req,
  output av_rsp_t          m_rsp,
  output logic             ram_cs,
  input  av_rsp_t          ram_rsp,
  output logic [N_PIOS-1:0] pio_cs,
  input  av_rsp_t          pio_rsp [N_PIOS],
  output logic             uart_cs,
  input  av_rsp_t          uart_rsp
);


  logic hit_pio_region;
  logic unmapped;
  logic unmapped_rd_q;
  logic [AV_ADDR_W-1:0] pio_off;

  always_comb begin
    ram_cs  = (m_req.address - RAM_BASE) < AV_ADDR_W'(RAM_BYTES);
    pio_off = m_req.address - PIO_BASE;
    hit_pio_region = (m_req.address >= PIO_BASE) &&
                     (pio_off < AV_ADDR_W'(4 * N_PIOS));
    pio_cs  = '0;
    for (int i = 0; i < int'(N_PIOS); i++)
      if (hit_pio_region && pio_off[AV_ADDR_W-1:2] == (AV_ADDR_W-2)'(i))
        pio_cs[i] = 1'b1;
    uart_cs  = (m_req.address - UART_BASE) < AV_ADDR_W'(UART_BYTES);
    unmapped = !ram_cs && !hit_pio_region && !uart_cs;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) unmapped_rd_q <= 1'b0;
    else        unmapped_rd_q <= unmapped && m_req.read;
  end

  always_comb begin
    m_rsp = '0;
    if (ram_rsp.readdatavalid) m_rsp = ram_rsp;
    if (uart_rsp.readdatavalid) m_rsp = uart_rsp;
    for (int i = 0; i < int'(N_PIOS); i++)
      if (pio_rsp[i].readdatavalid) m_rsp = pio_rsp[i];
    if (unmapped_rd_q) m_rsp.readdatavalid = 1'b1;
  end

  a_onehot_select: assert property (
    @(posedge clk) disable iff (!rst_n) $onehot0({ram_cs, pio_cs, uart_cs}));

endmodule
