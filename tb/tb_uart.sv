// tb_uart - 48 MHz clock, 9600 baud. A serial model in the testbench
// sends bytes into rx (with exact 104.167 us bits); the testbench checks
// RXDATA, RX_VALID, irq and the overrun flag, and that a short low glitch
// is not taken for a start bit. Bytes written to TXDATA are decoded from
// tx by sampling mid-bit; the testbench checks the data, the stop bit,
// TX_BUSY and the bit time (5000 clocks).
`timescale 1ns / 1ps
module tb_uart;
  localparam real BIT_NS = 1.0e9 / 9600;
  logic clk = 1'b0, rst_n = 1'b1;
  logic cs = 1'b0, read = 1'b0, write = 1'b0;
  logic [1:0] address = '0;
  logic [31:0] writedata = '0, readdata;
  logic readdatavalid, irq, rx = 1'b1, tx;
  int checks = 0, failures = 0;

  uart dut (.clk(clk), .rst_n(rst_n), .chipselect(cs), .read(read),
            .write(write), .address(address), .writedata(writedata),
            .readdata(readdata), .readdatavalid(readdatavalid), .irq(irq),
            .rx(rx), .tx(tx));

  always #10.41667 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_serial(logic [7:0] b);
    rx = 1'b0; #(BIT_NS);
    for (int i = 0; i < 8; i++) begin rx = b[i]; #(BIT_NS); end
    rx = 1'b1; #(BIT_NS);
  endtask

  task automatic bus_read(logic [1:0] a, output logic [31:0] d);
    @(negedge clk); cs = 1'b1; read = 1'b1; address = a;
    @(negedge clk); cs = 1'b0; read = 1'b0;
    checks++; if (!readdatavalid) failures++;
    d = readdata;
  endtask

  task automatic bus_write(logic [1:0] a, logic [31:0] d);
    @(negedge clk); cs = 1'b1; write = 1'b1; address = a; writedata = d;
    @(negedge clk); cs = 1'b0; write = 1'b0;
  endtask

  // decode one frame from tx
  task automatic receive_tx(output logic [7:0] b);
    @(negedge tx);
    #(BIT_NS / 2);
    checks++; if (tx !== 1'b0) failures++;
    for (int i = 0; i < 8; i++) begin #(BIT_NS); b[i] = tx; end
    #(BIT_NS);
    checks++; if (tx !== 1'b1) failures++;  // stop bit
  endtask

  initial begin
    logic [31:0] d;
    logic [7:0] msg [6];
    logic [7:0] got;
    realtime bt;
    msg = '{8'h68, 8'h0D, 8'h73, 8'hA5, 8'h00, 8'hFF};  // "h", CR, "s", ...
    #1 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    #1000;
    bus_read(2'd2, d);
    checks++; if (d[2:0] !== 3'b000 || tx !== 1'b1 || irq !== 1'b0) failures++;

    // receive
    foreach (msg[k]) begin
      send_serial(msg[k]);
      #(BIT_NS / 2);
      checks++; if (irq !== 1'b1) failures++;
      bus_read(2'd2, d);
      checks++; if (d[0] !== 1'b1 || d[2] !== 1'b0) failures++;
      bus_read(2'd0, d);
      checks++; if (d[7:0] !== msg[k]) begin failures++; $display("rx %h exp %h", d[7:0], msg[k]); end
      bus_read(2'd2, d);
      checks++; if (d[0] !== 1'b0 || irq !== 1'b0) failures++;
    end

    // overrun: two bytes without reading
    send_serial(8'h31); send_serial(8'h32);
    #(BIT_NS / 2);
    bus_read(2'd2, d);
    checks++; if (d[2:0] !== 3'b101) failures++;
    bus_read(2'd0, d);
    checks++; if (d[7:0] !== 8'h32) failures++;
    bus_read(2'd2, d);
    checks++; if (d[2:0] !== 3'b000) failures++;

    // a 20 us low glitch is not a start bit
    rx = 1'b0; #20000; rx = 1'b1; #(3 * BIT_NS);
    checks++; if (irq !== 1'b0) failures++;

    // transmit
    foreach (msg[k]) begin
      fork
        bus_write(2'd1, {24'd0, msg[k]});
        receive_tx(got);
        begin
          #5000;
          bus_read(2'd2, d);
          checks++; if (d[1] !== 1'b1) failures++;   // busy
          bus_write(2'd1, 32'h00);                   // ignored while busy
        end
      join
      checks++; if (got !== msg[k]) begin failures++; $display("tx %h exp %h", got, msg[k]); end
      #(BIT_NS);
      bus_read(2'd2, d);
      checks++; if (d[1] !== 1'b0) failures++;
    end
    // bit time: a frame with a single one after the start bit
    fork
      bus_write(2'd1, 32'h01);
      begin
        realtime t0;
        @(negedge tx); t0 = $realtime;
        @(posedge tx); bt = $realtime - t0;
      end
    join
    checks++;
    if (bt < 5000 * 20.8333 - 25 || bt > 5000 * 20.8333 + 25) begin
      failures++; $display("start bit %0.1f ns", bt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
