// tb_uart_width: the data length is a build-time parameter of the UART.
// Two UARTs with tx looped back to rx, one with 16 data bits per frame and
// one with 5, both at 1 MHz / 12500 baud (80 clock cycles per bit), each
// send 10 random words; the test checks that every word comes back intact
// and in order, and that a frame occupies DATA_BITS + 2 bit periods on the
// line (measured from the start edge to the transmitter's done pulse,
// which follows the end of the stop bit by up to 3 cycles).
module tb_uart_width;
  localparam int CLK_HZ = 1_000_000;
  localparam int BAUD   = 12_500;
  localparam int BIT    = CLK_HZ / BAUD;

  logic clk = 1'b0;
  logic rst_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // 16-bit instance
  logic tx16, rd16, empty16, wr16, full16;
  logic [15:0] r16, w16;
  uart #(.CLK_FREQ_HZ(CLK_HZ), .BAUD_RATE(BAUD), .DATA_BITS(16)) dut16 (
    .clk, .rst_n, .rx(tx16), .tx(tx16), .rd_uart(rd16), .r_data(r16), .rx_empty(empty16),
    .wr_uart(wr16), .w_data(w16), .tx_full(full16)
  );

  // 5-bit instance
  logic tx5, rd5, empty5, wr5, full5;
  logic [4:0] r5, w5;
  uart #(.CLK_FREQ_HZ(CLK_HZ), .BAUD_RATE(BAUD), .DATA_BITS(5)) dut5 (
    .clk, .rst_n, .rx(tx5), .tx(tx5), .rd_uart(rd5), .r_data(r5), .rx_empty(empty5),
    .wr_uart(wr5), .w_data(w5), .tx_full(full5)
  );

  // frame length monitor: cycles from start edge to done pulse
  int len16 = 0, len5 = 0, n16 = 0, n5 = 0;
  initial forever begin
    int t0;
    @(negedge tx16); t0 = cyc;
    @(posedge clk iff dut16.u_transmitter.txd_doneH);
    len16 = cyc - t0;
    check(len16 >= 18 * BIT && len16 <= 18 * BIT + 3, $sformatf("16-bit frame length %0d cycles", len16));
    n16++;
  end
  initial forever begin
    int t0;
    @(negedge tx5); t0 = cyc;
    @(posedge clk iff dut5.u_transmitter.txd_doneH);
    len5 = cyc - t0;
    check(len5 >= 7 * BIT && len5 <= 7 * BIT + 3, $sformatf("5-bit frame length %0d cycles", len5));
    n5++;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d16[10];
    logic [4:0]  d5[10];
    foreach (d16[i]) begin d16[i] = 16'($urandom); d5[i] = 5'($urandom); end
    rst_n = 1'b0; rd16 = 0; wr16 = 0; w16 = 0; rd5 = 0; wr5 = 0; w5 = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    fork
      foreach (d16[i]) begin
        while (full16) begin @(posedge clk); #1; end
        w16 = d16[i]; wr16 = 1'b1; @(posedge clk); #1; wr16 = 1'b0;
      end
      foreach (d5[i]) begin
        while (full5) begin @(posedge clk); #1; end
        w5 = d5[i]; wr5 = 1'b1; @(posedge clk); #1; wr5 = 1'b0;
      end
      foreach (d16[i]) begin
        while (empty16) begin @(posedge clk); #1; end
        check(r16 == d16[i], $sformatf("16-bit word %0d: %h expected %h", i, r16, d16[i]));
        rd16 = 1'b1; @(posedge clk); #1; rd16 = 1'b0;
      end
      foreach (d5[i]) begin
        while (empty5) begin @(posedge clk); #1; end
        check(r5 == d5[i], $sformatf("5-bit word %0d: %h expected %h", i, r5, d5[i]));
        rd5 = 1'b1; @(posedge clk); #1; rd5 = 1'b0;
      end
    join
    repeat (BIT) @(posedge clk);
    check(n16 == 10 && n5 == 10, $sformatf("frames timed: %0d and %0d", n16, n5));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
