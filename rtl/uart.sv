// uart - serial port between the soft CPU and the PC, 8N1 at 9600 baud.
//
// A bus slave with three word registers (offsets in bytes):
//   0x0 RXDATA  r  last received byte; reading it clears RX_VALID
//   0x4 TXDATA  w  byte to send; ignored while TX_BUSY
//   0x8 STATUS  r  bit 0 RX_VALID, bit 1 TX_BUSY, bit 2 RX_OVERRUN
//                  (a byte arrived while RX_VALID was still set; cleared
//                  by reading RXDATA)
// irq is high while RX_VALID is set. Read data follow one clock after
// the read, as for the other slaves; bits 31:8 (31:3 for STATUS) read 0.
//
// The transmitter sends a start bit, eight data bits LSB first and a stop
// bit, each CLK_HZ / BAUD clocks long. The receiver synchronises rx with
// two flip-flops, waits half a bit after a falling edge, checks that the
// start bit is still low, then samples each data bit in its middle; a low
// stop bit drops the byte. The 9600 baud rate and the 48 MHz system clock
// follow the tester; the register layout, the frame format and the
// receiver's sampling scheme are this design's choices.
module uart #(
  parameter int unsigned CLK_HZ = 48_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        chipselect,
  input  logic        read,
  input  logic        write,
  input  logic [1:0]  address,       // word offset
  input  logic [31:0] writedata,
  output logic [31:0] readdata,
  output logic        readdatavalid,
  output logic        irq,
  input  logic        rx,
  output logic        tx
);

  localparam int unsigned BIT_CLKS = CLK_HZ / BAUD;
  localparam int unsigned CNT_W    = $clog2(BIT_CLKS + 1);

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;

  // ------------------------------------------------------------ transmit
  logic [9:0]       tx_shift;
  logic [3:0]       tx_bits;       // bits still to send
  logic [CNT_W-1:0] tx_cnt;
  logic             tx_busy;

  assign tx_busy = (tx_bits != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_shift <= '1;
      tx_bits  <= '0;
      tx_cnt   <= '0;
    end else if (!tx_busy) begin
      if (chipselect && write && address == 2'd1) begin
        tx_shift <= {1'b1, writedata[7:0], 1'b0};
        tx_bits  <= 4'd10;
        tx_cnt   <= CNT_W'(BIT_CLKS - 1);
      end
    end else if (tx_cnt == 0) begin
      tx_shift <= {1'b1, tx_shift[9:1]};
      tx_bits  <= tx_bits - 4'd1;
      tx_cnt   <= CNT_W'(BIT_CLKS - 1);
    end else begin
      tx_cnt <= tx_cnt - 1'b1;
    end
  end

  assign tx = tx_busy ? tx_shift[0] : 1'b1;

  // ------------------------------------------------------------- receive
  logic [1:0]       rx_sync;
  rx_state_e        rx_state;
  logic [CNT_W-1:0] rx_cnt;
  logic [2:0]       rx_idx;
  logic [7:0]       rx_shift, rx_data;
  logic             rx_valid, rx_overrun;
  logic             rd_rxdata;

  assign rd_rxdata = chipselect && read && address == 2'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rx_sync <= 2'b11;
    else        rx_sync <= {rx_sync[0], rx};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_state   <= RX_IDLE;
      rx_cnt     <= '0;
      rx_idx     <= '0;
      rx_shift   <= '0;
      rx_data    <= '0;
      rx_valid   <= 1'b0;
      rx_overrun <= 1'b0;
    end else begin
      if (rd_rxdata) begin
        rx_valid   <= 1'b0;
        rx_overrun <= 1'b0;
      end
      unique case (rx_state)
        RX_IDLE:
          if (!rx_sync[1]) begin
            rx_state <= RX_START;
            rx_cnt   <= CNT_W'(BIT_CLKS / 2 - 1);
          end
        RX_START:
          if (rx_cnt != 0) rx_cnt <= rx_cnt - 1'b1;
          else if (rx_sync[1]) rx_state <= RX_IDLE;  // glitch, not a start bit
          else begin
            rx_state <= RX_DATA;
            rx_cnt   <= CNT_W'(BIT_CLKS - 1);
            rx_idx   <= '0;
          end
        RX_DATA:
          if (rx_cnt != 0) rx_cnt <= rx_cnt - 1'b1;
          else begin
            rx_shift <= {rx_sync[1], rx_shift[7:1]};
            rx_cnt   <= CNT_W'(BIT_CLKS - 1);
            if (rx_idx == 3'd7) rx_state <= RX_STOP;
            rx_idx <= rx_idx + 3'd1;
          end
        RX_STOP:
          if (rx_cnt != 0) rx_cnt <= rx_cnt - 1'b1;
          else begin
            rx_state <= RX_IDLE;
            if (rx_sync[1]) begin
              rx_data  <= rx_shift;
              rx_valid <= 1'b1;
              if (rx_valid && !rd_rxdata) rx_overrun <= 1'b1;
            end
          end
        default: rx_state <= RX_IDLE;
      endcase
    end
  end

  assign irq = rx_valid;

  // ----------------------------------------------------------- bus reads
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      readdata      <= '0;
      readdatavalid <= 1'b0;
    end else begin
      readdatavalid <= chipselect && read;
      if (chipselect && read)
        unique case (address)
          2'd0:    readdata <= {24'd0, rx_data};
          2'd2:    readdata <= {29'd0, rx_overrun, tx_busy, rx_valid};
          default: readdata <= '0;
        endcase
    end
  end

  a_no_read_and_write: assert property (
    @(posedge clk) disable iff (!rst_n) chipselect |-> !(read && write));

endmodule
