// uart_pkg: constants shared by the UART blocks.
//
// The frame carried on the serial line is one start bit (low), DATA_BITS
// data bits sent least significant bit first, and one stop bit (high), with
// no parity bit. The receiver samples the line with a bit-cell clock running
// OVERSAMPLE times faster than the bit rate. The 8-bit data width and the
// 8x bit-cell clock follow the receiver and transmitter block diagrams (8-bit
// RSR/RDR/DBUS buses, clock named bclkx8); leaving out parity follows the
// receiver description, which has no error checking logic by default.
package uart_pkg;

  // Default data bits per frame and width of the parallel port. The receiver,
  // transmitter and top take the width as a parameter with this default.
  localparam int unsigned DEFAULT_DATA_BITS = 8;

  // Bit-cell clock periods per bit on the serial line.
  localparam int unsigned OVERSAMPLE = 8;

  // Width of the bit-cell counter (counts bit cells within one bit).
  localparam int unsigned RX_CELL_CT_W = 4;

endpackage
