// tb_uart_rx: self-checking test of uart_rx.
// The testbench makes its own bit-cell clock bclkx8 (period P = 10 sysclk
// cycles, so one bit is 80 cycles) and drives serial frames on rxd with a
// random phase against bclkx8 and a random idle gap. It checks:
//  - every good frame gives exactly one rxd_readyH pulse with RDR equal to
//    the byte sent, about 9.5 bit periods after the start edge (middle of
//    the stop bit, within one bit cell);
//  - a low glitch shorter than half a bit gives no byte (false start);
//  - a frame with a low stop bit gives no byte (dropped frame);
//  - bytes with every bit pattern class (00, FF, random).
module tb_uart_rx;
  localparam int P   = 10;        // sysclk cycles per bclkx8 period
  localparam int BIT = 8 * P;     // sysclk cycles per bit

  logic sysclk = 1'b0;
  logic rst_n, rxd, bclkx8, rxd_readyH;
  logic [7:0] RDR;
  int checks = 0, failures = 0;
  int cyc = 0, pulses = 0, pulse_cyc = 0;
  logic [7:0] pulse_data;
  int n_good = 0, n_glitch = 0, n_badstop = 0;

  always #5 sysclk = ~sysclk;

  // bit-cell clock from the testbench
  int pc = 0;
  always @(posedge sysclk) begin
    cyc++;
    pc = (pc + 1) % P;
    bclkx8 <= (pc < P / 2);
  end

  always @(posedge sysclk) if (rst_n && rxd_readyH) begin
    pulses++;
    pulse_cyc = cyc;
    pulse_data = RDR;
  end

  uart_rx dut (.sysclk, .rst_n, .rxd, .bclkx8, .RDR, .rxd_readyH);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send_frame(input logic [7:0] b, input logic stop);
    rxd = 1'b0;
    repeat (BIT) @(posedge sysclk);
    for (int i = 0; i < 8; i++) begin
      rxd = b[i];
      repeat (BIT) @(posedge sysclk);
    end
    rxd = stop;
    repeat (BIT) @(posedge sysclk);
    rxd = 1'b1;
  endtask

  initial begin
    repeat (200000) @(posedge sysclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; rxd = 1'b1; bclkx8 = 1'b0;
    repeat (3) @(posedge sysclk);
    check(RDR == 8'h00 && !rxd_readyH, "reset values");
    #1 rst_n = 1'b1;
    repeat (2 * BIT) @(posedge sysclk);
    for (int n = 0; n < 60; n++) begin
      int kind;
      logic [7:0] b;
      int n_before;
      int t0;
      kind = (n % 6 == 3) ? 1 : (n % 6 == 5) ? 2 : 0;   // 0 good, 1 glitch, 2 bad stop
      b = (n == 0) ? 8'h00 : (n == 1) ? 8'hFF : (n == 2) ? 8'hA5 : 8'($urandom);
      n_before = pulses;
      repeat ($urandom_range(1, 2 * BIT)) @(posedge sysclk);
      #2;
      t0 = cyc;
      if (kind == 1) begin
        rxd = 1'b0;
        repeat ($urandom_range(1, BIT / 2 - 2 * P)) @(posedge sysclk);
        #2 rxd = 1'b1;
        repeat (12 * BIT) @(posedge sysclk);
        check(pulses == n_before, "glitch produced a byte");
        n_glitch++;
      end else begin
        send_frame(b, kind == 0);
        repeat (2 * BIT) @(posedge sysclk);
        if (kind == 0) begin
          check(pulses == n_before + 1, $sformatf("frame %0d: %0d pulses", n, pulses - n_before));
          check(pulse_data == b, $sformatf("frame %0d: RDR=%h sent %h", n, pulse_data, b));
          check(RDR == b, "RDR not held");
          // middle of stop bit = 9.5 bits after the start edge
          check(pulse_cyc - t0 >= 19 * BIT / 2 - P && pulse_cyc - t0 <= 19 * BIT / 2 + P + 3,
                $sformatf("frame %0d: latency %0d cycles", n, pulse_cyc - t0));
          n_good++;
        end else begin
          check(pulses == n_before, "frame with bad stop bit produced a byte");
          n_badstop++;
          repeat (2 * BIT) @(posedge sysclk);
        end
      end
    end
    check(n_good > 0 && n_glitch > 0 && n_badstop > 0, "all frame kinds sent");
    $display("good=%0d glitch=%0d badstop=%0d", n_good, n_glitch, n_badstop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
