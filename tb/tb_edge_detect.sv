// tb_edge_detect: self-checking test of edge_detect.
// Drives a slow random square wave (levels held 1..6 cycles) and checks
// every cycle that rise is high exactly in the first cycle of each high
// level, i.e. once per rising edge, and never at the falling edge.
module tb_edge_detect;
  logic sysclk = 1'b0;
  logic rst_n, sig, rise;
  logic prev;
  int checks = 0, failures = 0, edges = 0, pulses = 0;

  always #5 sysclk = ~sysclk;

  edge_detect dut (.sysclk, .rst_n, .sig, .rise);

  initial begin
    repeat (20000) @(posedge sysclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; sig = 1'b1; prev = 1'b1;
    repeat (2) @(posedge sysclk);
    #1 checks++; if (rise) begin failures++; $display("FAIL rise while in reset with sig high"); end
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      int len;
      len = $urandom_range(1, 6);
      sig = ~sig;
      if (sig) edges++;
      for (int k = 0; k < len; k++) begin
        #1;
        checks++;
        if (rise !== (sig && !prev)) begin
          failures++;
          $display("FAIL at %0t: sig=%b prev=%b rise=%b", $time, sig, prev, rise);
        end
        if (rise) pulses++;
        @(posedge sysclk);
        prev = sig;
        #1;
      end
    end
    checks++;
    if (pulses != edges) begin
      failures++;
      $display("FAIL %0d pulses for %0d rising edges", pulses, edges);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
