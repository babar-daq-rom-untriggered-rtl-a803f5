// tb_flink_resync -- self-checking test of the FLINK clock-domain crossing.
//
// Phase 1: the write clock has the system clock's period but a phase that is
// changed between runs, then a slightly shorter period (a few parts in a
// thousand fast); packets of 16 random words with gaps, control flags and
// link status bits are written.  Every word must come out on SYSCLK once, in
// order and unchanged, within 6 clocks of being written, and no overflow may
// be flagged.  lrdy_s and err_s must follow their inputs within 3 clocks.
// Phase 2: the write clock runs three times faster with words on every edge,
// so the FIFO fills.  The words that come out must be an in-order subset of
// those written, and words out + overflow pulses must equal words written.
module tb_flink_resync;
  import upc_pkg::*;

  logic clk = 0, wclk = 0, rst_n = 0;
  real  whalf = 5.0;
  logic in_valid = 0, in_ctrl = 0, in_lrdy = 1, in_err = 0;
  logic [WORD_W-1:0] in_word = '0;
  logic overflow, out_valid, out_ctrl, out_lrdy, out_err, lrdy_s, err_s;
  logic [WORD_W-1:0] out_word;

  flink_resync dut (.*);

  always #5 clk = ~clk;
  initial begin #2; forever #(whalf) wclk = ~wclk; end

  int checks = 0, failures = 0;
  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  typedef struct { logic [WORD_W+2:0] d; time t; } ent_t;
  ent_t sent [$];
  int n_sent = 0, n_got = 0, n_ovf = 0, n_skipped = 0;
  bit phase2 = 0;

  always @(posedge wclk) if (rst_n) begin
    if (overflow) n_ovf++;
  end

  // writer: one word per wclk edge while in_valid
  task automatic write_word(input logic ctrl, input logic [WORD_W-1:0] w, input logic lk, input logic er);
    @(negedge wclk);
    in_valid = 1; in_ctrl = ctrl; in_word = w; in_lrdy = lk; in_err = er;
    @(posedge wclk);
    sent.push_back('{d: {ctrl, er, lk, w}, t: $time});
    n_sent++;
    #0;
  endtask

  // reader: compare against the queue of written words
  always @(posedge clk) if (rst_n && out_valid) begin
    logic [WORD_W+2:0] got;
    got = {out_ctrl, out_err, out_lrdy, out_word};
    n_got++;
    if (!phase2) begin
      ent_t e;
      check(sent.size() > 0, "word out with nothing written");
      if (sent.size() > 0) begin
        e = sent.pop_front();
        check(got == e.d, $sformatf("word %0d: exp %h got %h", n_got, e.d, got));
        check($time - e.t <= 60, $sformatf("latency %0t", $time - e.t));
      end
    end else begin
      while (sent.size() > 0 && sent[0].d != got) begin void'(sent.pop_front()); n_skipped++; end
      check(sent.size() > 0, "phase 2 word not among those written, or out of order");
      if (sent.size() > 0) void'(sent.pop_front());
    end
  end

  task automatic idle(input int n);
    repeat (n) begin @(negedge wclk); in_valid = 0; end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // phase 1: several phases, then a slightly fast link clock
    for (int run = 0; run < 6; run++) begin
      whalf = (run < 5) ? 5.0 : 4.985;
      for (int pk = 0; pk < 40; pk++) begin
        for (int i = 0; i < 16; i++)
          write_word(i == 0, WORD_W'($urandom), ($urandom % 20) != 0, ($urandom % 25) == 0);
        idle(2 + $urandom % 20);
      end
      idle(20);
      check(sent.size() == 0, "all words delivered");
      // shift the phase of the link clock
      #($urandom % 10);
    end
    check(n_ovf == 0, "no overflow at the link rate");
    check(n_got == n_sent && n_sent == 6 * 40 * 16, $sformatf("words %0d of %0d", n_got, n_sent));
    // status synchronisers
    @(negedge clk); in_lrdy = 0; in_err = 1;
    repeat (3) @(negedge clk);
    check(!lrdy_s && err_s, "status follows within 3 clocks");
    @(negedge clk); in_lrdy = 1; in_err = 0;
    repeat (3) @(negedge clk);
    check(lrdy_s && !err_s, "status returns");
    // phase 2: link clock three times too fast
    phase2 = 1;
    n_sent = 0; n_got = 0;
    whalf = 1.5;
    for (int i = 0; i < 300; i++) write_word(1'b0, WORD_W'(i), 1'b1, 1'b0);
    idle(40);
    repeat (10) @(negedge clk);
    $display("phase 2: written %0d delivered %0d overflow %0d", n_sent, n_got, n_ovf);
    check(n_ovf > 0, "overflow flagged when the FIFO fills");
    check(n_got + n_ovf == n_sent, "every word either delivered or flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
