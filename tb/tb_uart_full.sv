// tb_uart_full: the UART at its default parameters (50 MHz clock, 9600
// baud, 4-word FIFOs), with tx looped back to rx. The host writes three
// bytes; the test checks that they come back through the receive FIFO in
// order, that an independent monitor decodes them from tx with the
// expected bit period (5208 clock cycles: the baud generator divides by
// 651 for the 8x bit-cell clock), and that the whole transfer takes about
// 3 frames of 11 bit periods.
module tb_uart_full;
  localparam int BIT = 8 * 651;

  logic clk = 1'b0;
  logic rst_n, tx, rd_uart, rx_empty, wr_uart, tx_full;
  logic [7:0] r_data, w_data;
  int checks = 0, failures = 0, cyc = 0;

  always #10 clk = ~clk;          // 50 MHz
  always @(posedge clk) cyc++;

  uart dut (
    .clk, .rst_n, .rx(tx), .tx, .rd_uart, .r_data, .rx_empty, .wr_uart, .w_data, .tx_full
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [7:0] line_exp[$];
  int line_frames = 0;
  initial begin
    forever begin
      logic [7:0] got;
      int t0, t1;
      @(negedge tx);
      t0 = cyc;
      repeat (BIT / 2) @(posedge clk);
      #1 check(tx == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (BIT) @(posedge clk);
        #1 got[i] = tx;
      end
      repeat (BIT) @(posedge clk);
      #1 check(tx == 1'b1, "stop bit");
      // the stop bit ends exactly 10 bit periods after the start edge
      @(posedge clk iff (dut.u_transmitter.txd_doneH));
      t1 = cyc;
      check(t1 - t0 >= 10 * BIT && t1 - t0 <= 10 * BIT + 3, $sformatf("frame length %0d cycles", t1 - t0));
      if (line_exp.size() == 0) check(0, "unexpected frame");
      else begin
        logic [7:0] e;
        e = line_exp.pop_front();
        check(got == e, $sformatf("line byte %h expected %h", got, e));
      end
      line_frames++;
    end
  end

  initial begin
    repeat (50 * BIT) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] data[3];
    int t_start;
    data = '{8'h55, 8'h0F, 8'($urandom)};
    rst_n = 1'b0; rd_uart = 0; wr_uart = 0; w_data = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    t_start = cyc;
    foreach (data[i]) begin
      w_data = data[i]; wr_uart = 1'b1; line_exp.push_back(data[i]);
      @(posedge clk); #1;
    end
    wr_uart = 1'b0;
    foreach (data[i]) begin
      int t;
      t = 0;
      while (rx_empty && t < 13 * BIT) begin @(posedge clk); #1; t++; end
      check(!rx_empty, "nothing received");
      check(r_data == data[i], $sformatf("received %h expected %h", r_data, data[i]));
      rd_uart = 1'b1;
      @(posedge clk); #1;
      rd_uart = 1'b0;
    end
    // last byte is flagged in the middle of its stop bit: at most
    // 1 bit (wait for the first bclk edge) + 2 frames of 11 bits + 9.5 bits
    check(cyc - t_start <= 33 * BIT, $sformatf("transfer took %0d cycles", cyc - t_start));
    repeat (BIT) @(posedge clk); #1;
    check(line_frames == 3 && rx_empty, "three frames, FIFO drained");
    $display("transfer of 3 bytes: %0d cycles (%0d bit periods)", cyc - t_start, (cyc - t_start) / BIT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
