// uart: complete UART with receive and transmit FIFOs.
//
// The host sees an 8-bit parallel port. Bytes arriving on the serial input
// rx are assembled by the receiver and queued in a receive FIFO; the host
// reads the oldest one on r_data while rx_empty is low, and pulses rd_uart
// to remove it. The host writes bytes into a transmit FIFO with w_data and
// wr_uart while tx_full is low; the transmitter sends them on tx one after
// the other. Frames are 1 start bit, DATA_BITS data bits (default 8, LSB
// first) and 1 stop bit; the data length is a build-time parameter.
//
// Wiring (as in the UART circuit diagram): a baud rate generator feeds both
// the receiver (8x bit-cell clock bclkx8) and the transmitter (bit clock
// bclk). The receiver's data (RDR) and ready pulse (rxd_readyH) are the
// receive FIFO's w_data and wr. The transmit FIFO's head word is the
// transmitter's DBUS, its inverted empty flag is the transmitter's start
// request, and the transmitter's done pulse (txd_doneH) pops the word.
//
// When the receive FIFO is full, a newly received byte is lost (overrun);
// the host must keep up or the FIFO must be made deeper. A write to a full
// transmit FIFO is ignored. The bit rate is CLK_FREQ_HZ and BAUD_RATE; the
// defaults (50 MHz, 9600 baud, 4-word FIFOs) are this design's choice.
// Reset (rst_n, active low, asynchronous) clears everything.
module uart
#(
  parameter int unsigned CLK_FREQ_HZ = 50_000_000,
  parameter int unsigned BAUD_RATE   = 9600,
  parameter int unsigned FIFO_ADDR_W = 2,
  parameter int unsigned DATA_BITS   = uart_pkg::DEFAULT_DATA_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // serial line
  input  logic                 rx,
  output logic                 tx,
  // receive side of the parallel port
  input  logic                 rd_uart,
  output logic [DATA_BITS-1:0] r_data,
  output logic                 rx_empty,
  // transmit side of the parallel port
  input  logic                 wr_uart,
  input  logic [DATA_BITS-1:0] w_data,
  output logic                 tx_full
);

  logic                 bclkx8, bclk;
  logic [DATA_BITS-1:0] rx_dout, tx_din;
  logic                 rx_done_tick, tx_done_tick, tx_empty;

  baud_gen #(
    .CLK_FREQ_HZ (CLK_FREQ_HZ),
    .BAUD_RATE   (BAUD_RATE)
  ) u_baud_gen (
    .sysclk (clk),
    .rst_n  (rst_n),
    .bclkx8 (bclkx8),
    .bclk   (bclk)
  );

  uart_rx #(
    .DATA_BITS (DATA_BITS)
  ) u_receiver (
    .sysclk     (clk),
    .rst_n      (rst_n),
    .rxd        (rx),
    .bclkx8     (bclkx8),
    .RDR        (rx_dout),
    .rxd_readyH (rx_done_tick)
  );

  fifo #(
    .DATA_W (DATA_BITS),
    .ADDR_W (FIFO_ADDR_W)
  ) u_rx_fifo (
    .clk    (clk),
    .rst_n  (rst_n),
    .rd     (rd_uart),
    .wr     (rx_done_tick),
    .w_data (rx_dout),
    .empty  (rx_empty),
    .full   (),
    .r_data (r_data)
  );

  fifo #(
    .DATA_W (DATA_BITS),
    .ADDR_W (FIFO_ADDR_W)
  ) u_tx_fifo (
    .clk    (clk),
    .rst_n  (rst_n),
    .rd     (tx_done_tick),
    .wr     (wr_uart),
    .w_data (w_data),
    .empty  (tx_empty),
    .full   (tx_full),
    .r_data (tx_din)
  );

  uart_tx #(
    .DATA_BITS (DATA_BITS)
  ) u_transmitter (
    .sysclk     (clk),
    .rst_n      (rst_n),
    .DBUS       (tx_din),
    .txd_startH (~tx_empty),
    .bclk       (bclk),
    .txd        (tx),
    .txd_doneH  (tx_done_tick)
  );

endmodule
