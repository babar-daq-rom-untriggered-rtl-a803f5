// tb_sync_fifo -- self-checking test of the FIFO used as OUT_FIFO.
//
// Random pushes and pops against a queue model, filling to full and
// draining to empty, simultaneous push and pop, and clear.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, pop = 0;
  logic [15:0] din = '0, dout;
  logic empty, full;
  logic [4:0] count;
  int checks = 0, failures = 0, n_full = 0;
  logic [15:0] q [$];

  sync_fifo #(.WIDTH(16), .DEPTH(16)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      check(empty == (q.size() == 0) && full == (q.size() == 16) && count == 5'(q.size()), "flags");
      if (q.size() > 0) check(dout == q[0], "head");
      if (full) n_full++;
      // phases bias towards filling or draining
      push = ((t / 200) % 2 == 0) ? ($urandom % 4 != 0) : ($urandom % 4 == 0);
      pop  = ((t / 200) % 2 == 0) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
      if (push && q.size() == 16) push = 0;   // a full FIFO takes no push, even with a pop
      if (pop && q.size() == 0) pop = 0;
      din = 16'($urandom);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    @(negedge clk); push = 0; pop = 0;
    @(negedge clk); clear = 1; q.delete();
    @(negedge clk); clear = 0;
    check(empty && count == 0, "clear");
    check(n_full > 0, "reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
