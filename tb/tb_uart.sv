// tb_uart: end-to-end test of the whole UART.
// The UART runs at CLK_FREQ_HZ = 1 MHz and BAUD_RATE = 12500, so the baud
// generator divides by 10 and one bit lasts 80 clock cycles; the FIFOs keep
// their default depth of 4. A testbench line model can either loop tx back
// to rx or drive rx itself; an independent monitor decodes every frame on
// tx. The test goes through:
//  1. loopback: the host writes 12 bytes as fast as tx_full allows and
//     reads them back from the receive FIFO; the monitor checks the bytes on
//     the line and that back-to-back frames are 11 bit periods apart;
//  2. a write while tx_full is high is ignored;
//  3. overrun: 7 bytes looped back while the host does not read; the first
//     4 are kept, the rest are lost, and the FIFO then reads empty;
//  4. the line model sends a short low glitch (false start) and a frame with
//     a low stop bit: neither may produce a byte; a good frame after them
//     must be received.
// Each mechanism is counted and must happen at least once.
module tb_uart;
  localparam int CLK_HZ = 1_000_000;
  localparam int BAUD   = 12_500;
  localparam int BIT    = CLK_HZ / BAUD;   // 80 cycles

  logic clk = 1'b0;
  logic rst_n, rx, tx, rd_uart, rx_empty, wr_uart, tx_full;
  logic [7:0] r_data, w_data;
  logic loop, rx_drv;
  int checks = 0, failures = 0, cyc = 0;

  // mechanism counters
  int n_tx_full = 0, n_wr_ignored = 0, n_b2b = 0, n_overrun = 0;
  int n_false_start = 0, n_bad_stop = 0, n_loopback = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  assign rx = loop ? tx : rx_drv;

  uart #(.CLK_FREQ_HZ(CLK_HZ), .BAUD_RATE(BAUD)) dut (
    .clk, .rst_n, .rx, .tx, .rd_uart, .r_data, .rx_empty, .wr_uart, .w_data, .tx_full
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- line monitor on tx ----
  logic [7:0] line_exp[$];
  int last_start = -1, line_frames = 0;
  initial begin
    forever begin
      logic [7:0] got;
      int t_start;
      @(negedge tx);
      t_start = cyc;
      repeat (BIT / 2) @(posedge clk);
      #1 check(tx == 1'b0, "start bit not low in its middle");
      for (int i = 0; i < 8; i++) begin
        repeat (BIT) @(posedge clk);
        #1 got[i] = tx;
      end
      repeat (BIT) @(posedge clk);
      #1 check(tx == 1'b1, "stop bit low");
      if (line_exp.size() == 0) check(0, "unexpected frame on tx");
      else begin
        logic [7:0] e;
        e = line_exp.pop_front();
        check(got == e, $sformatf("tx line byte %h expected %h", got, e));
      end
      if (last_start >= 0 && t_start - last_start == 11 * BIT) n_b2b++;
      last_start = t_start;
      line_frames++;
    end
  end

  // ---- host helpers ----
  task automatic host_write(input logic [7:0] b);
    while (tx_full) begin
      n_tx_full++;
      @(posedge clk); #1;
    end
    w_data = b; wr_uart = 1'b1;
    line_exp.push_back(b);
    @(posedge clk); #1;
    wr_uart = 1'b0;
  endtask

  task automatic host_read(output logic [7:0] b, input int timeout_cycles);
    int t = 0;
    while (rx_empty && t < timeout_cycles) begin @(posedge clk); #1; t++; end
    check(!rx_empty, "receive FIFO stayed empty");
    b = r_data;
    rd_uart = 1'b1;
    @(posedge clk); #1;
    rd_uart = 1'b0;
  endtask

  task automatic line_frame(input logic [7:0] b, input logic stop);
    rx_drv = 1'b0;
    repeat (BIT) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx_drv = b[i]; repeat (BIT) @(posedge clk); end
    rx_drv = stop;
    repeat (BIT) @(posedge clk);
    rx_drv = 1'b1;
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] data[$];
    logic [7:0] b;
    rst_n = 1'b0; loop = 1'b1; rx_drv = 1'b1;
    rd_uart = 0; wr_uart = 0; w_data = 0;
    repeat (3) @(posedge clk);
    check(tx == 1'b1 && rx_empty && !tx_full, "state after reset");
    #1 rst_n = 1'b1;
    repeat (BIT) @(posedge clk); #1;

    // 1. loopback with host writer and reader running together
    for (int i = 0; i < 12; i++) data.push_back((i == 0) ? 8'h00 : (i == 1) ? 8'hFF : 8'($urandom));
    fork
      foreach (data[i]) host_write(data[i]);
      begin
        for (int i = 0; i < 12; i++) begin
          host_read(b, 14 * BIT);
          check(b == data[i], $sformatf("loopback byte %0d: %h expected %h", i, b, data[i]));
          n_loopback++;
        end
      end
    join
    repeat (2 * BIT) @(posedge clk); #1;
    check(rx_empty, "receive FIFO not empty after loopback");

    // 2. write while full is ignored
    for (int i = 0; i < 5; i++) host_write(8'h30 + 8'(i));
    check(tx_full, "transmit FIFO not full after 5 quick writes");
    w_data = 8'hEE; wr_uart = 1'b1;     // must be dropped
    @(posedge clk); #1;
    wr_uart = 1'b0;
    n_wr_ignored++;
    for (int i = 0; i < 5; i++) begin
      host_read(b, 14 * BIT);
      check(b == 8'h30 + 8'(i), $sformatf("after full: byte %h expected %h", b, 8'h30 + 8'(i)));
    end
    repeat (14 * BIT) @(posedge clk); #1;
    check(rx_empty, "ignored write was transmitted");

    // 3. overrun: 7 bytes, host does not read
    for (int i = 0; i < 7; i++) host_write(8'h50 + 8'(i));
    wait (line_exp.size() == 0);
    repeat (2 * BIT) @(posedge clk); #1;
    for (int i = 0; i < 4; i++) begin
      host_read(b, 1);
      check(b == 8'h50 + 8'(i), $sformatf("overrun: kept byte %h expected %h", b, 8'h50 + 8'(i)));
    end
    check(rx_empty, "receive FIFO holds more than 4 bytes");
    if (rx_empty) n_overrun += 3;

    // 4. line model drives rx
    loop = 1'b0;
    repeat (2 * BIT) @(posedge clk); #1;
    rx_drv = 1'b0;                      // glitch: 2 bit cells
    repeat (BIT / 4) @(posedge clk); #1;
    rx_drv = 1'b1;
    repeat (12 * BIT) @(posedge clk); #1;
    check(rx_empty, "false start produced a byte");
    if (rx_empty) n_false_start++;
    line_frame(8'h3C, 1'b0);            // low stop bit
    repeat (3 * BIT) @(posedge clk); #1;
    check(rx_empty, "frame with low stop bit produced a byte");
    if (rx_empty) n_bad_stop++;
    line_frame(8'hC3, 1'b1);
    repeat (BIT) @(posedge clk); #1;
    host_read(b, 1);
    check(b == 8'hC3, $sformatf("byte after errors %h expected C3", b));

    check(line_exp.size() == 0, "bytes written but not seen on tx");
    check(n_tx_full > 0, "tx_full never seen");
    check(n_wr_ignored > 0, "write while full never done");
    check(n_b2b > 0, "no back-to-back transmit frames");
    check(n_overrun > 0, "receive overrun never happened");
    check(n_false_start > 0, "false start never rejected");
    check(n_bad_stop > 0, "bad stop bit never dropped");
    check(n_loopback == 12, "loopback incomplete");
    $display("mechanisms: tx_full_waits=%0d wr_ignored=%0d back_to_back=%0d overrun_lost=%0d false_start=%0d bad_stop=%0d loopback=%0d line_frames=%0d",
             n_tx_full, n_wr_ignored, n_b2b, n_overrun, n_false_start, n_bad_stop, n_loopback, line_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
