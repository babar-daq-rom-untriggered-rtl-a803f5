// tb_cc_interface -- self-checking test of the controller-card interface.
//
// Models the three OUT_FIFOs as queues.  Checks: RX_DATA with results
// already present answers at once; RX_DATA waiting for a late result; a
// timeout after exactly 595 + 16 * samples clocks with the right status bits
// and zero result words; disabled FLINKs neither waited for nor popped; the
// three PC_RD# reads returning A, B, C with PC_END on the third; RX_READ
// answered with DONE and PC_END; CLINK Sync / Spy Start decoding; and the
// link-status pin mapping with enable gating.
module tb_cc_interface;
  import upc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [2:0] en = 3'b111;
  logic [9:0] samples = 10'd64;
  logic rx_data = 0, rx_read = 0, pc_rd_n = 1;
  logic done, pc_end, rx_read_err;
  logic [7:0] status;
  logic [15:0] result;
  logic [2:0] of_empty, of_pop;
  result_t [2:0] of_head;
  logic clink_valid = 0;
  logic [3:0] clink_op = '0;
  logic sync, spy_start;
  logic [2:0] fl_lrdy = 3'b111, fl_err = 3'b000;
  logic n_clrdya, n_clrdyb, n_dlrdya, n_dlrdyb, dlerra, dlerrb, n_cllcka, n_cllckb;
  int checks = 0, failures = 0, n_timeout = 0;
  result_t q [3][$];

  cc_interface dut (.*);

  always #5 clk = ~clk;
  always_comb for (int f = 0; f < 3; f++) begin
    of_empty[f] = q[f].size() == 0;
    of_head[f]  = (q[f].size() > 0) ? q[f][0] : '0;
  end
  always @(posedge clk) for (int f = 0; f < 3; f++) if (of_pop[f] && q[f].size() > 0) void'(q[f].pop_front());

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one RX_DATA transaction; returns the clocks to DONE and the three words
  task automatic transaction(output int wait_clk, output logic [7:0] st,
                             output logic [2:0][15:0] words, output bit end_ok,
                             input int late_flink, input int late_after);
    wait_clk = 0;
    @(negedge clk); rx_data = 1; @(negedge clk); rx_data = 0;
    while (!done && wait_clk < 5000) begin
      @(negedge clk); wait_clk++;
      if (late_flink >= 0 && wait_clk == late_after) q[late_flink].push_back(result_t'(16'hABCD));
    end
    st = status;
    end_ok = 1;
    for (int r = 0; r < 3; r++) begin
      repeat (2) @(negedge clk);
      pc_rd_n = 0; @(negedge clk); pc_rd_n = 1;
      words[r] = result;
      if (pc_end != (r == 2)) end_ok = 0;
    end
    @(negedge clk);
  endtask

  initial begin
    int w; logic [7:0] st; logic [2:0][15:0] words; bit eo;
    result_t a, b, c;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // results already present
    a = result_t'($urandom); b = result_t'($urandom); c = result_t'($urandom);
    q[0].push_back(a); q[1].push_back(b); q[2].push_back(c);
    transaction(w, st, words, eo, -1, 0);
    check(w <= 2, $sformatf("immediate done (%0d)", w));
    check(st == 8'h00, "status no timeout");
    check(words[0] == a && words[1] == b && words[2] == c, "words A B C");
    check(eo, "PC_END with FLINK C word");
    check(q[0].size() == 0 && q[1].size() == 0 && q[2].size() == 0, "all popped");
    // FLINK B late
    q[0].push_back(a); q[2].push_back(c);
    transaction(w, st, words, eo, 1, 300);
    check(w >= 300 && w <= 303, $sformatf("waited for late FLINK B (%0d)", w));
    check(st == 0 && words[1] == 16'hABCD, "late result delivered");
    // FLINK C times out
    samples = 10'd64;
    q[0].push_back(a); q[1].push_back(b);
    transaction(w, st, words, eo, -1, 0);
    n_timeout++;
    check(w >= 595 + 16*64 && w <= 595 + 16*64 + 3, $sformatf("timeout length %0d", w));
    check(st == 8'h04, $sformatf("status %h", st));
    check(words[0] == a && words[1] == b && words[2] == 0, "timed-out word is zero");
    // shorter L1Accept, shorter timeout; everything times out
    samples = 10'd10;
    transaction(w, st, words, eo, -1, 0);
    n_timeout++;
    check(w >= 595 + 160 && w <= 595 + 160 + 3, $sformatf("timeout length %0d", w));
    check(st == 8'h07 && words == '0, "all timed out");
    // FLINK B disabled: not waited for, not popped, word zero
    en = 3'b101;
    q[0].push_back(a); q[1].push_back(b); q[2].push_back(c);
    transaction(w, st, words, eo, -1, 0);
    check(w <= 2 && st == 0, "disabled FLINK not waited for");
    check(words[0] == a && words[1] == 0 && words[2] == c, "disabled word zero");
    check(q[1].size() == 1, "disabled FIFO not popped");
    void'(q[1].pop_front());
    en = 3'b111;
    // RX_READ
    @(negedge clk); rx_read = 1; @(negedge clk); rx_read = 0;
    check(done && pc_end && rx_read_err, "RX_READ answered with DONE and PC_END");
    // CLINK commands
    for (int op = 0; op < 16; op++) begin
      @(negedge clk); clink_valid = 1; clink_op = 4'(op);
      @(negedge clk); clink_valid = 0;
      check(sync == (op == 2) && spy_start == (op == 6), $sformatf("opcode %0d", op));
    end
    // link status mapping
    for (int t = 0; t < 64; t++) begin
      {en, fl_lrdy} = 6'(t); fl_err = 3'($urandom);
      #1;
      check(n_clrdya == 0 && n_clrdyb == 0, "CLINK ready tied active");
      check(n_dlrdya == !(en[0] && fl_lrdy[0]) && n_dlrdyb == !(en[1] && fl_lrdy[1]), "D-link ready");
      check(dlerra == (en[0] && fl_err[0]) && dlerrb == (en[1] && fl_err[1]), "D-link error");
      check(n_cllcka == !(en[2] && fl_lrdy[2]) && n_cllckb == (en[2] && fl_err[2]), "FLINK C on CLINK lock");
    end
    check(n_timeout > 0, "timeout happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
