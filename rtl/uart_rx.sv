// uart_rx: UART receiver (serial to parallel).
//
// The receiver watches rxd for a start bit, samples each following bit near
// its middle, shifts the DATA_BITS data bits (default 8, least significant
// first) into the data
// shift register RSR, checks the stop bit, and then copies RSR into the
// received data register RDR and raises rxd_readyH.
//
// Structure (as in the receiver block diagram): a state machine drives a
// received bit counter (clr1/inc1/ct1, 3 bits for 8 data bits), a bit-cell counter
// (clr2/inc2/ct2, 4 bits), the data shift register (shftRSR) and the
// received data loader (load_RDR). Everything runs on sysclk; bclkx8, the
// bit-cell clock at 8x the bit rate, is sampled by a flip-flop and its rising
// edge (bclkx8_rising) is the enable for every bit-cell step. ok_en is
// registered by a flip-flop to give rxd_readyH.
//
// State machine (states and thresholds are this design's own choice):
//   IDLE           falling edge on rxd (high last cycle, low now)
//                  -> START_DETECT.
//   START_DETECT   on each bclkx8 edge: rxd high again -> IDLE (noise);
//                  4th low sample (ct2 == 3, about the middle of the start
//                  bit) -> RECV_DATA.
//   RECV_DATA      every 8th bclkx8 edge (ct2 == 7) is the middle of a data
//                  bit: shift rxd into the top of RSR; after the last data
//                  bit -> STOP_BIT.
//   STOP_BIT       8 edges later, in the middle of the stop bit: if rxd is
//                  high, load RDR and assert ok_en; in any case -> IDLE.
// A frame whose stop bit reads low is dropped without a flag: the receiver
// has no error outputs. Because IDLE waits for a falling edge rather than a
// low level, a line held low (a break, or a bad stop bit) is not taken for
// a string of start bits; the receiver resynchronises on the next high-to-
// low transition. rxd_dlayed, the one-cycle-old copy of rxd used for this,
// is this design's addition to the diagram. rxd is used as it arrives: a line driven from
// another clock domain should pass through a synchroniser first.
//
// Timing: rxd_readyH is a one-sysclk pulse, in the cycle after RDR takes the
// new byte; RDR holds it until the next good frame. Reset (rst_n, active low,
// asynchronous) returns to IDLE and clears RSR, RDR and rxd_readyH.
module uart_rx
  import uart_pkg::*;
#(
  parameter int unsigned DATA_BITS = uart_pkg::DEFAULT_DATA_BITS
) (
  input  logic                 sysclk,
  input  logic                 rst_n,
  input  logic                 rxd,
  input  logic                 bclkx8,
  output logic [DATA_BITS-1:0] RDR,
  output logic                 rxd_readyH
);

  typedef enum logic [1:0] {
    IDLE,
    START_DETECT,
    RECV_DATA,
    STOP_BIT
  } rx_state_t;

  // received bit counter width: 3 bits for 8 data bits
  localparam int unsigned RX_BIT_CT_W = (DATA_BITS > 1) ? $clog2(DATA_BITS) : 1;

  rx_state_t state, state_nxt;

  logic                    bclkx8_rising;
  logic                    clr1, inc1, clr2, inc2;
  logic [RX_BIT_CT_W-1:0]  ct1;
  logic [RX_CELL_CT_W-1:0] ct2;
  logic                    shftRSR, load_RDR, ok_en;
  logic [DATA_BITS-1:0]    RSR;
  logic                    rxd_dlayed;

  edge_detect u_bclkx8_edge (
    .sysclk (sysclk),
    .rst_n  (rst_n),
    .sig    (bclkx8),
    .rise   (bclkx8_rising)
  );

  bit_counter #(.WIDTH(RX_BIT_CT_W)) u_received_bit_counter (
    .sysclk (sysclk),
    .rst_n  (rst_n),
    .clr    (clr1),
    .inc    (inc1),
    .ct     (ct1)
  );

  bit_counter #(.WIDTH(RX_CELL_CT_W)) u_bit_cell_counter (
    .sysclk (sysclk),
    .rst_n  (rst_n),
    .clr    (clr2),
    .inc    (inc2),
    .ct     (ct2)
  );

  localparam logic [RX_CELL_CT_W-1:0] HALF_BIT_LAST = RX_CELL_CT_W'(OVERSAMPLE / 2 - 1);
  localparam logic [RX_CELL_CT_W-1:0] BIT_LAST      = RX_CELL_CT_W'(OVERSAMPLE - 1);
  localparam logic [RX_BIT_CT_W-1:0]  DATA_LAST     = RX_BIT_CT_W'(DATA_BITS - 1);

  always_comb begin
    state_nxt = state;
    clr1      = 1'b0;
    inc1      = 1'b0;
    clr2      = 1'b0;
    inc2      = 1'b0;
    shftRSR   = 1'b0;
    load_RDR  = 1'b0;
    ok_en     = 1'b0;
    unique case (state)
      IDLE: begin
        clr1 = 1'b1;
        clr2 = 1'b1;
        if (rxd_dlayed && !rxd) state_nxt = START_DETECT;
      end
      START_DETECT: begin
        if (bclkx8_rising) begin
          if (rxd) begin
            state_nxt = IDLE;
          end else if (ct2 == HALF_BIT_LAST) begin
            clr2      = 1'b1;
            state_nxt = RECV_DATA;
          end else begin
            inc2 = 1'b1;
          end
        end
      end
      RECV_DATA: begin
        if (bclkx8_rising) begin
          if (ct2 == BIT_LAST) begin
            clr2    = 1'b1;
            shftRSR = 1'b1;
            if (ct1 == DATA_LAST) begin
              clr1      = 1'b1;
              state_nxt = STOP_BIT;
            end else begin
              inc1 = 1'b1;
            end
          end else begin
            inc2 = 1'b1;
          end
        end
      end
      STOP_BIT: begin
        if (bclkx8_rising) begin
          if (ct2 == BIT_LAST) begin
            clr2      = 1'b1;
            load_RDR  = rxd;
            ok_en     = rxd;
            state_nxt = IDLE;
          end else begin
            inc2 = 1'b1;
          end
        end
      end
      default: state_nxt = IDLE;
    endcase
  end

  always_ff @(posedge sysclk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      RSR        <= '0;
      RDR        <= '0;
      rxd_readyH <= 1'b0;
      rxd_dlayed <= 1'b0;
    end else begin
      state <= state_nxt;
      // data shift register: LSB arrives first, so shift right
      if (shftRSR)  RSR <= {rxd, RSR[DATA_BITS-1:1]};
      // received data loader
      if (load_RDR) RDR <= RSR;
      rxd_readyH <= ok_en;
      rxd_dlayed <= rxd;
    end
  end

endmodule
