// edge_detect: rising-edge detector for a slow, sysclk-synchronous clock.
//
// The receiver and transmitter are clocked by the fast system clock and
// treat the baud clocks (bclkx8, bclk) as data. A flip-flop keeps last
// cycle's value of the slow clock (sig_dlayed); rise is high for exactly one
// sysclk cycle, the cycle in which sig is high and sig_dlayed is still low.
// This follows the DFF / *_dlayed / *_rising structure of the receiver and
// transmitter block diagrams. rise is combinational from sig, so sig must
// come from a flip-flop in the sysclk domain (as baud_gen provides).
// rst_n clears the delay flip-flop asynchronously; the reset value 1 is this
// design's choice, so that a clock already high at reset is not taken as an
// edge.
module edge_detect (
  input  logic sysclk,
  input  logic rst_n,
  input  logic sig,
  output logic rise
);

  logic sig_dlayed;

  always_ff @(posedge sysclk or negedge rst_n) begin
    if (!rst_n) sig_dlayed <= 1'b1;
    else        sig_dlayed <= sig;
  end

  assign rise = sig & ~sig_dlayed;

endmodule
