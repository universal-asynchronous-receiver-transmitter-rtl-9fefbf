// bit_counter: counter cleared and advanced by a controlling state machine.
//
// The UART receiver uses two of these (the received bit counter and the
// bit-cell counter) and the transmitter one (the transmitted bit counter);
// all three have the same clr/inc/count interface, as in the block diagrams.
// On a rising sysclk edge the count becomes 0 when clr is high, otherwise it
// goes up by one when inc is high (wrapping at 2**WIDTH), otherwise it holds.
// clr wins over inc. The count is a register: it changes one cycle after the
// request. rst_n clears it asynchronously (active-low reset as drawn in the
// diagrams). The wrap-around and the clr priority are this design's choice.
module bit_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             sysclk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             inc,
  output logic [WIDTH-1:0] ct
);

  always_ff @(posedge sysclk or negedge rst_n) begin
    if (!rst_n)   ct <= '0;
    else if (clr) ct <= '0;
    else if (inc) ct <= ct + 1'b1;
  end

endmodule
