// tb_bit_counter: self-checking test of bit_counter.
// Drives random clr/inc patterns into a 4-bit and a 3-bit counter and
// compares the counts every cycle with a reference model: clear wins, then
// increment modulo 2**WIDTH, else hold. Also checks the asynchronous reset.
module tb_bit_counter;
  logic sysclk = 1'b0;
  logic rst_n;
  logic clr, inc;
  logic [3:0] ct4;
  logic [2:0] ct3;
  int unsigned exp4, exp3;
  int checks = 0, failures = 0;

  always #5 sysclk = ~sysclk;

  bit_counter #(.WIDTH(4)) dut4 (.sysclk, .rst_n, .clr, .inc, .ct(ct4));
  bit_counter #(.WIDTH(3)) dut3 (.sysclk, .rst_n, .clr, .inc, .ct(ct3));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: ct4=%0d exp4=%0d ct3=%0d exp3=%0d", what, ct4, exp4, ct3, exp3);
    end
  endtask

  initial begin
    repeat (5000) @(posedge sysclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; clr = 1'b0; inc = 1'b1;
    exp4 = 0; exp3 = 0;
    repeat (3) @(posedge sysclk);
    #1 check(ct4 == 0 && ct3 == 0, "reset");
    rst_n = 1'b1;
    // long increment run to see the wrap
    for (int i = 0; i < 40; i++) begin
      @(posedge sysclk);
      exp4 = (exp4 + 1) % 16; exp3 = (exp3 + 1) % 8;
      #1 check(ct4 == 4'(exp4) && ct3 == 3'(exp3), "increment");
    end
    for (int i = 0; i < 2000; i++) begin
      clr = ($urandom_range(0, 9) == 0);
      inc = $urandom_range(0, 1);
      @(posedge sysclk);
      if (clr) begin exp4 = 0; exp3 = 0; end
      else if (inc) begin exp4 = (exp4 + 1) % 16; exp3 = (exp3 + 1) % 8; end
      #1 check(ct4 == 4'(exp4) && ct3 == 3'(exp3), "random");
    end
    // asynchronous reset in mid-cycle
    inc = 1'b1; clr = 1'b0;
    @(posedge sysclk); #2 rst_n = 1'b0; #1 check(ct4 == 0 && ct3 == 0, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
