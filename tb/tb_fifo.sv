// tb_fifo: self-checking test of fifo (8-bit words, 4 deep).
// Random reads and writes, with phases biased towards filling and towards
// draining, are compared every cycle with a queue model: r_data must equal
// the oldest word, and empty/full must match the model's occupancy. Writes
// to a full FIFO and reads from an empty one must be ignored.
module tb_fifo;
  logic clk = 1'b0;
  logic rst_n, rd, wr, empty, full;
  logic [7:0] w_data, r_data;
  logic [7:0] model[$];
  int checks = 0, failures = 0, n_full = 0, n_empty_rd = 0, n_full_wr = 0, n_both = 0;

  always #5 clk = ~clk;

  fifo dut (.clk, .rst_n, .rd, .wr, .w_data, .empty, .full, .r_data);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; rd = 0; wr = 0; w_data = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      int bias;
      bias = (i / 200) % 2;   // 0: fill, 1: drain
      wr = bias ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      rd = bias ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      w_data = 8'($urandom);
      #1;
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == 4)) begin
        failures++;
        $display("FAIL flags: empty=%b full=%b size=%0d", empty, full, model.size());
      end
      if (model.size() > 0) begin
        checks++;
        if (r_data != model[0]) begin
          failures++;
          $display("FAIL r_data=%h expected %h", r_data, model[0]);
        end
      end
      if (full) n_full++;
      if (rd && empty) n_empty_rd++;
      if (wr && full && !rd) n_full_wr++;
      if (wr && rd && !empty) n_both++;
      // model update
      begin
        bit do_rd, do_wr;
        do_rd = rd && model.size() > 0;
        do_wr = wr && (model.size() < 4 || do_rd);
        if (do_rd) void'(model.pop_front());
        if (do_wr) model.push_back(w_data);
      end
      @(posedge clk);
      #1;
    end
    checks++;
    if (n_full == 0 || n_empty_rd == 0 || n_full_wr == 0 || n_both == 0) begin
      failures++;
      $display("FAIL coverage: full=%0d rd_empty=%0d wr_full=%0d both=%0d", n_full, n_empty_rd, n_full_wr, n_both);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
