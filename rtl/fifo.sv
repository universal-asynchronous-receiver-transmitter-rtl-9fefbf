// fifo: synchronous first-in first-out buffer with 2**ADDR_W words.
//
// The UART places one of these between the receiver and the host and one
// between the host and the transmitter. The write side takes w_data when wr
// is high; the read side always shows the oldest word on r_data (first-word
// fall-through) while empty is low, and rd removes it. A write while full
// and a read while empty are ignored; a write and a read in the same cycle
// while full both happen. full and empty are registered flags.
//
// Storage is a register array indexed by a write and a read pointer; the
// flags are updated from the pointers' next values. r_data is a
// combinational read of the array at the read pointer, so a popped word is
// replaced on r_data in the cycle after rd. Depth 4 and the overflow/
// underflow behaviour are this design's choices. Reset (rst_n, active low,
// asynchronous) empties the buffer.
module fifo #(
  parameter int unsigned DATA_W = uart_pkg::DEFAULT_DATA_BITS,
  parameter int unsigned ADDR_W = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rd,
  input  logic              wr,
  input  logic [DATA_W-1:0] w_data,
  output logic              empty,
  output logic              full,
  output logic [DATA_W-1:0] r_data
);

  logic [DATA_W-1:0] mem [2**ADDR_W];
  logic [ADDR_W-1:0] w_ptr, r_ptr, w_ptr_nxt, r_ptr_nxt;
  logic              do_wr, do_rd, full_nxt, empty_nxt;

  assign do_rd = rd && !empty;
  assign do_wr = wr && (!full || rd);

  always_comb begin
    w_ptr_nxt = w_ptr;
    r_ptr_nxt = r_ptr;
    full_nxt  = full;
    empty_nxt = empty;
    unique case ({do_wr, do_rd})
      2'b10: begin
        w_ptr_nxt = w_ptr + 1'b1;
        empty_nxt = 1'b0;
        full_nxt  = (w_ptr + 1'b1 == r_ptr);
      end
      2'b01: begin
        r_ptr_nxt = r_ptr + 1'b1;
        full_nxt  = 1'b0;
        empty_nxt = (r_ptr + 1'b1 == w_ptr);
      end
      2'b11: begin
        w_ptr_nxt = w_ptr + 1'b1;
        r_ptr_nxt = r_ptr + 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[w_ptr] <= w_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_ptr <= '0;
      r_ptr <= '0;
      full  <= 1'b0;
      empty <= 1'b1;
    end else begin
      w_ptr <= w_ptr_nxt;
      r_ptr <= r_ptr_nxt;
      full  <= full_nxt;
      empty <= empty_nxt;
    end
  end

  assign r_data = mem[r_ptr];

  a_not_full_and_empty: assert property (@(posedge clk) disable iff (!rst_n) !(full && empty));
  a_ptrs_meet: assert property (@(posedge clk) disable iff (!rst_n)
                                (full || empty) |-> (w_ptr == r_ptr));

endmodule
