// baud_gen: baud rate generator.
//
// Divides the system clock into the two baud clocks the UART uses:
//   bclkx8 - the bit-cell clock, OVERSAMPLE (8) times the bit rate, which the
//            receiver uses to find the middle of each bit;
//   bclk   - the bit clock, at the bit rate, which paces the transmitter.
// Both are square-ish waves driven straight from flip-flops in the sysclk
// domain; the receiver and transmitter detect their rising edges.
//
// A counter runs from 0 to DIV-1, DIV = CLK_FREQ_HZ / (BAUD_RATE*OVERSAMPLE)
// rounded to the nearest integer. bclkx8 rises when the counter wraps and
// falls halfway through the count, so one bclkx8 period is exactly DIV
// sysclk cycles. A 3-bit counter advanced at each bclkx8 rising edge gives
// bclk as its top bit, so one bclk period is exactly 8 bclkx8 periods, and
// every bclk rising edge coincides with a bclkx8 rising edge.
//
// The bit rate is set by parameters (the rate is configurable at build
// time). The default 50 MHz system clock and 9600 baud are this design's
// choice; DIV = 651 then, for 9600.6 baud. Reset is asynchronous, active low.
module baud_gen #(
  parameter int unsigned CLK_FREQ_HZ = 50_000_000,
  parameter int unsigned BAUD_RATE   = 9600,
  parameter int unsigned OVERSAMPLE  = uart_pkg::OVERSAMPLE,
  // sysclk cycles per bclkx8 period; at least 2
  parameter int unsigned DIV = (CLK_FREQ_HZ + (BAUD_RATE * OVERSAMPLE) / 2) / (BAUD_RATE * OVERSAMPLE)
) (
  input  logic sysclk,
  input  logic rst_n,
  output logic bclkx8,
  output logic bclk
);

  localparam int unsigned CNT_W = (DIV > 1) ? $clog2(DIV) : 1;
  localparam int unsigned PH_W  = (OVERSAMPLE > 1) ? $clog2(OVERSAMPLE) : 1;

  logic [CNT_W-1:0] cnt;
  logic [PH_W-1:0]  phase;    // bclkx8 periods within one bclk period
  logic             wrap;

  assign wrap = (cnt == CNT_W'(DIV - 1));

  always_ff @(posedge sysclk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      bclkx8 <= 1'b0;
      phase  <= '0;
    end else begin
      cnt <= wrap ? '0 : cnt + 1'b1;
      if (wrap) begin
        bclkx8 <= 1'b1;
        phase  <= phase + 1'b1;
      end else if (cnt == CNT_W'(DIV / 2 - 1)) begin
        bclkx8 <= 1'b0;
      end
    end
  end

  // High for the second half of the OVERSAMPLE bclkx8 periods: rises when
  // phase steps from OVERSAMPLE/2-1 to OVERSAMPLE/2.
  assign bclk = phase[PH_W-1];

  initial begin
    assert (DIV >= 2) else $error("baud_gen: DIV must be at least 2");
    assert (OVERSAMPLE == (1 << PH_W)) else $error("baud_gen: OVERSAMPLE must be a power of 2");
  end

endmodule
