// tb_baud_gen: self-checking test of baud_gen.
// A small instance (CLK_FREQ_HZ = 800, BAUD_RATE = 10, so DIV = 10) and an
// instance at the default 50 MHz / 9600 baud (DIV = 651) are run side by
// side. For each, the test measures the sysclk cycles between rising edges
// of bclkx8 (must be DIV) and of bclk (must be 8*DIV), checks that every
// bclk rising edge falls in a cycle where bclkx8 also rises, and that
// bclkx8 is high for DIV/2 cycles of each period.
module tb_baud_gen;
  logic sysclk = 1'b0;
  logic rst_n;
  logic x8_s, b_s, x8_d, b_d;
  int checks = 0, failures = 0;

  always #5 sysclk = ~sysclk;

  baud_gen #(.CLK_FREQ_HZ(800), .BAUD_RATE(10)) dut_small (.sysclk, .rst_n, .bclkx8(x8_s), .bclk(b_s));
  baud_gen dut_default (.sysclk, .rst_n, .bclkx8(x8_d), .bclk(b_d));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Measures one instance: edge spacing and duty cycle.
  // lx8/lb: previous levels; tx8/tb: cycle of the last rising edge.
  int cyc = 0;
  logic px8_s = 0, pb_s = 0, px8_d = 0, pb_d = 0;
  int t8_s = -1, tb_s = -1, t8_d = -1, tb_d = -1, hi_s = 0, hi_d = 0;
  int n8_s = 0, nb_s = 0, n8_d = 0, nb_d = 0;

  always @(posedge sysclk) if (rst_n) begin
    cyc++;
    // small instance
    if (x8_s) hi_s++;
    if (x8_s && !px8_s) begin
      if (t8_s >= 0) begin
        check(cyc - t8_s == 10, $sformatf("small bclkx8 period %0d", cyc - t8_s));
        check(hi_s == 5 + 1 || hi_s == 5, $sformatf("small bclkx8 high time %0d", hi_s));
        n8_s++;
      end
      t8_s = cyc; hi_s = 1;
    end
    if (b_s && !pb_s) begin
      check(x8_s && !px8_s, "small bclk edge not aligned with bclkx8 edge");
      if (tb_s >= 0) begin
        check(cyc - tb_s == 80, $sformatf("small bclk period %0d", cyc - tb_s));
        nb_s++;
      end
      tb_s = cyc;
    end
    // default instance
    if (x8_d) hi_d++;
    if (x8_d && !px8_d) begin
      if (t8_d >= 0) begin
        check(cyc - t8_d == 651, $sformatf("default bclkx8 period %0d", cyc - t8_d));
        n8_d++;
      end
      t8_d = cyc; hi_d = 1;
    end
    if (b_d && !pb_d) begin
      check(x8_d && !px8_d, "default bclk edge not aligned with bclkx8 edge");
      if (tb_d >= 0) begin
        check(cyc - tb_d == 8 * 651, $sformatf("default bclk period %0d", cyc - tb_d));
        nb_d++;
      end
      tb_d = cyc;
    end
    px8_s = x8_s; pb_s = b_s; px8_d = x8_d; pb_d = b_d;
  end

  initial begin
    repeat (30000) @(posedge sysclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge sysclk);
    check(!x8_s && !b_s && !x8_d && !b_d, "outputs low in reset");
    #1 rst_n = 1'b1;
    repeat (8 * 651 * 3 + 700) @(posedge sysclk);
    check(n8_s > 100 && nb_s > 15, "small instance produced edges");
    check(n8_d >= 20 && nb_d >= 2, "default instance produced edges");
    $display("edges: small x8=%0d b=%0d default x8=%0d b=%0d", n8_s, nb_s, n8_d, nb_d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
