// uart_tx: UART transmitter (parallel to serial).
//
// On txd_startH the transmitter takes the byte on DBUS and sends on txd a
// start bit (low), the DATA_BITS data bits (default 8) least significant first and a stop bit
// (high), one bit per period of bclk, the bit clock. It then pulses
// txd_doneH for one sysclk cycle. txd idles high.
//
// Structure (as in the transmitter block diagram): a state machine drives
// the transmitted bit counter (clr/inc/bct, 4 bits for 8 data bits) and a data shift
// register TSR whose bit 0 is txd. The register has DATA_BITS+1 bits: loadTSR puts
// DBUS in TSR[DATA_BITS:1] and keeps TSR[0] = 1 (line still idle); start clears
// TSR[0], which begins the start bit; shftTSR shifts right and fills with 1,
// so the stop bit follows the last data bit by itself. bclk is sampled by a
// flip-flop and its rising edge (bclk_rising) paces every bit. txd_done is
// registered by a flip-flop to give txd_doneH.
//
// State machine (states are this design's own choice):
//   IDLE    txd_startH -> loadTSR, go to SYNCH. DBUS is read in this cycle.
//   SYNCH   wait for bclk_rising -> start (start bit on txd), go to TDATA.
//   TDATA   on each bclk_rising: bct < DATA_BITS+1 -> shift, bct + 1 (data bits, then
//           the stop bit); bct == DATA_BITS+1 (stop bit
//           complete) -> txd_done, DONE.
//   DONE    one cycle, in which txd_doneH is high, then IDLE. It lets a
//           FIFO feeding DBUS pop its word before IDLE looks at txd_startH.
// txd_startH is ignored while a frame is in progress.
//
// Timing: from txd_startH to the start bit is up to one bclk period (the
// wait for the next bit boundary); the frame lasts DATA_BITS+2 bclk periods; so with
// txd_startH held high, back-to-back frames are DATA_BITS+3 bit periods apart (the
// line stays high for one extra bit between them). Reset (rst_n, active low,
// asynchronous) returns to IDLE with txd high.
module uart_tx
#(
  parameter int unsigned DATA_BITS = uart_pkg::DEFAULT_DATA_BITS
) (
  input  logic                 sysclk,
  input  logic                 rst_n,
  input  logic [DATA_BITS-1:0] DBUS,
  input  logic                 txd_startH,
  input  logic                 bclk,
  output logic                 txd,
  output logic                 txd_doneH
);

  typedef enum logic [1:0] {
    IDLE,
    SYNCH,
    TDATA,
    DONE
  } tx_state_t;

  // transmitted bit counter width: 4 bits for 8 data bits (counts 0..9)
  localparam int unsigned TX_BIT_CT_W = $clog2(DATA_BITS + 2);

  tx_state_t state, state_nxt;

  logic                   bclk_rising;
  logic                   clr, inc;
  logic [TX_BIT_CT_W-1:0] bct;
  logic                   loadTSR, start, shftTSR, txd_done;
  logic [DATA_BITS:0]     TSR;

  // bct value when the stop bit has been on the line for one bit period
  localparam logic [TX_BIT_CT_W-1:0] BCT_LAST = TX_BIT_CT_W'(DATA_BITS + 1);

  edge_detect u_bclk_edge (
    .sysclk (sysclk),
    .rst_n  (rst_n),
    .sig    (bclk),
    .rise   (bclk_rising)
  );

  bit_counter #(.WIDTH(TX_BIT_CT_W)) u_transmitted_bit_counter (
    .sysclk (sysclk),
    .rst_n  (rst_n),
    .clr    (clr),
    .inc    (inc),
    .ct     (bct)
  );

  always_comb begin
    state_nxt = state;
    clr       = 1'b0;
    inc       = 1'b0;
    loadTSR   = 1'b0;
    start     = 1'b0;
    shftTSR   = 1'b0;
    txd_done  = 1'b0;
    unique case (state)
      IDLE: begin
        clr = 1'b1;
        if (txd_startH) begin
          loadTSR   = 1'b1;
          state_nxt = SYNCH;
        end
      end
      SYNCH: begin
        if (bclk_rising) begin
          start     = 1'b1;
          state_nxt = TDATA;
        end
      end
      TDATA: begin
        if (bclk_rising) begin
          if (bct == BCT_LAST) begin
            clr       = 1'b1;
            txd_done  = 1'b1;
            state_nxt = DONE;
          end else begin
            shftTSR = 1'b1;
            inc     = 1'b1;
          end
        end
      end
      DONE:    state_nxt = IDLE;
      default: state_nxt = IDLE;
    endcase
  end

  always_ff @(posedge sysclk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      TSR       <= '1;
      txd_doneH <= 1'b0;
    end else begin
      state <= state_nxt;
      if (loadTSR)      TSR    <= {DBUS, 1'b1};
      else if (start)   TSR[0] <= 1'b0;
      else if (shftTSR) TSR    <= {1'b1, TSR[DATA_BITS:1]};
      txd_doneH <= txd_done;
    end
  end

  assign txd = TSR[0];

  // The counter never passes the stop bit.
  a_bct_range: assert property (@(posedge sysclk) disable iff (!rst_n) bct <= BCT_LAST);
  // The line is idle (high) whenever no frame is in progress.
  a_idle_high: assert property (@(posedge sysclk) disable iff (!rst_n)
                                (state == IDLE || state == DONE) |-> txd);

endmodule
