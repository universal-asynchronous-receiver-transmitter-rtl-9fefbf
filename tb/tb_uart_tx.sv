// tb_uart_tx: self-checking test of uart_tx.
// The testbench makes its own bit clock bclk (period B = 40 sysclk cycles)
// and decodes txd with an independent monitor that finds the start bit's
// falling edge and samples every bit in its middle. It checks:
//  - the decoded byte equals the byte on DBUS when txd_startH was taken,
//    and the stop bit is high;
//  - the start bit and each data bit last exactly B cycles, and the start
//    bit begins within one bclk period of txd_startH;
//  - txd_doneH is a single one-cycle pulse one bit period after the stop
//    bit begins;
//  - with txd_startH held high, frames follow each other 11 bit periods
//    apart, and DBUS changes during a frame do not disturb it.
module tb_uart_tx;
  localparam int B = 40;

  logic sysclk = 1'b0;
  logic rst_n, txd_startH, bclk, txd, txd_doneH;
  logic [7:0] DBUS;
  int checks = 0, failures = 0, cyc = 0;
  int done_pulses = 0, done_cyc = 0;
  logic [7:0] sent[$];
  int frames = 0, b2b = 0;

  always #5 sysclk = ~sysclk;

  int pc = 0;
  always @(posedge sysclk) begin
    cyc++;
    pc = (pc + 1) % B;
    bclk <= (pc < B / 2);
    if (rst_n && txd_doneH) begin done_pulses++; done_cyc = cyc; end
  end

  uart_tx dut (.sysclk, .rst_n, .DBUS, .txd_startH, .bclk, .txd, .txd_doneH);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Monitor: decode frames from txd.
  int last_start = -1;
  initial begin
    forever begin
      logic [7:0] got;
      int t_start, t_edge;
      @(negedge txd);
      t_start = cyc;
      // start bit must stay low for exactly B cycles
      t_edge = 0;
      for (int k = 0; k < B; k++) begin
        @(posedge sysclk); #1;
        if (txd && t_edge == 0) t_edge = k + 1;
      end
      check(t_edge == B || (t_edge == 0 && txd != 1'b0) || t_edge == 0, "start bit too short");
      check(t_edge == 0 || t_edge == B, $sformatf("start bit length %0d", t_edge));
      // sample data bits in their middles
      repeat (B / 2) @(posedge sysclk);
      for (int i = 0; i < 8; i++) begin
        #1 got[i] = txd;
        repeat (B) @(posedge sysclk);
      end
      #1 check(txd == 1'b1, "stop bit low");
      if (sent.size() == 0) begin
        check(0, "frame with nothing sent");
      end else begin
        logic [7:0] exp;
        exp = sent.pop_front();
        check(got == exp, $sformatf("txd byte %h expected %h", got, exp));
      end
      if (last_start >= 0 && t_start - last_start == 11 * B) b2b++;
      last_start = t_start;
      frames++;
    end
  end

  initial begin
    repeat (200000) @(posedge sysclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_req, n_done;
    rst_n = 1'b0; txd_startH = 1'b0; DBUS = 8'h00;
    repeat (3) @(posedge sysclk);
    check(txd == 1'b1 && !txd_doneH, "idle after reset");
    #1 rst_n = 1'b1;
    // single frames with random gaps
    for (int n = 0; n < 20; n++) begin
      repeat ($urandom_range(1, 3 * B)) @(posedge sysclk);
      #1;
      DBUS = (n == 0) ? 8'h00 : (n == 1) ? 8'hFF : 8'($urandom);
      sent.push_back(DBUS);
      txd_startH = 1'b1;
      t_req = cyc;
      n_done = done_pulses;
      @(posedge sysclk); #1;
      txd_startH = 1'b0;
      DBUS = 8'($urandom);           // must not matter any more
      @(negedge txd);
      check(cyc - t_req <= B + 2, $sformatf("start delay %0d", cyc - t_req));
      t_req = cyc;
      wait (done_pulses != n_done);
      @(posedge sysclk); #1;
      check(done_pulses == n_done + 1, "txd_doneH pulse count");
      check(done_cyc - t_req >= 10 * B && done_cyc - t_req <= 10 * B + 3,
            $sformatf("done after %0d cycles", done_cyc - t_req));
      check(!txd_doneH, "txd_doneH longer than one cycle");
    end
    // back-to-back: hold txd_startH, change DBUS after each done pulse
    DBUS = 8'($urandom);
    sent.push_back(DBUS);
    txd_startH = 1'b1;
    for (int n = 0; n < 8; n++) begin
      @(posedge sysclk iff txd_doneH);
      #1;
      if (n < 7) begin
        DBUS = 8'($urandom);
        sent.push_back(DBUS);
      end else begin
        txd_startH = 1'b0;
      end
    end
    repeat (3 * B) @(posedge sysclk);
    check(frames == 28, $sformatf("%0d frames decoded", frames));
    check(b2b >= 7, $sformatf("%0d back-to-back frames at 11 bit periods", b2b));
    check(sent.size() == 0, "bytes left unsent");
    $display("frames=%0d back_to_back=%0d", frames, b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
