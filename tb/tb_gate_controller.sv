// tb_gate_controller -- self-checking test of the gate controller.
//
// Presents one sample every 16 clocks (the spied sample, then the delayed
// sample one clock later) with random Tr bits and flags.  A reference model
// of the gate (retriggerable, N_ACC = 4 overlapping L1Accepts, each
// `samples` long) predicts which samples are stored at which circular-buffer
// addresses and the result (offset, FEX, neighbour FEX, READY) of every
// L1Accept, in order.  Covered: isolated and overlapping L1Accepts, a fifth
// overlapping L1Accept dropped, wrap-around of the buffer, software trigger
// enabled and disabled, and is_en clearing the state.  Counts how often each
// mechanism happened and fails if one never did.
module tb_gate_controller;
  import upc_pkg::*;
  logic clk = 0, rst_n = 0, is_en = 0;
  logic [9:0] samples = 10'd5;
  logic sw_trig = 0, sw_trig_en = 0, spy_valid = 0, spy_tr = 0, s_valid = 0;
  logic [7:0][63:0] s_words = '0;
  logic s_fex_local = 0, s_fex_neigh = 0, s_linkerr = 0;
  logic cb_we, of_push, gate, l1a_start, l1a_drop, of_ovf;
  logic [12:0] cb_waddr;
  logic [63:0] cb_wdata;
  result_t of_data;
  logic of_full = 0;
  int checks = 0, failures = 0;
  int n_overlap = 0, n_drop = 0, n_drop_dut = 0, n_wrap = 0, n_sw = 0, n_results = 0;

  gate_controller dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference model
  typedef struct { int start; int left; bit r, fl, fn; } l1a_t;
  l1a_t act [$];
  result_t exp_res [$];
  logic [63:0] exp_mem [int];
  logic [63:0] got_mem [int];
  int wp = 0;
  bit last_word_written;

  always @(posedge clk) if (rst_n && l1a_drop) n_drop_dut++;
  always @(posedge clk) if (rst_n && cb_we) got_mem[int'(cb_waddr)] = cb_wdata;
  always @(posedge clk) if (rst_n && of_push) begin
    n_results++;
    if (exp_res.size() == 0) check(0, "unexpected result");
    else begin
      result_t e;
      e = exp_res.pop_front();
      check(of_data == e, $sformatf("result exp %h got %h", e, of_data));
      // the sample's last word was written in the cycle before the push
      check(got_mem.exists((int'(e.offset) + 8*int'(samples) - 1) % 8192), "data in IS before result");
    end
  end

  task automatic one_sample(input bit tr, input bit sw, input int id);
    logic [7:0][63:0] w;
    bit fl, fn, lk;
    for (int i = 0; i < 8; i++) w[i] = {32'(id), 32'(i * 32'h01010101 ^ 32'($urandom))};
    fl = ($urandom % 9 == 0); fn = ($urandom % 11 == 0); lk = ($urandom % 13 == 0);
    // model
    if (tr || (sw && sw_trig_en)) begin
      if (act.size() < 4) begin
        if (act.size() > 0) n_overlap++;
        act.push_back('{start: wp, left: int'(samples), r: 0, fl: 0, fn: 0});
      end else n_drop++;
    end
    if (act.size() > 0) begin
      for (int i = 0; i < 8; i++) exp_mem[(wp + i) % 8192] = w[i];
      if (wp + 8 > 8191) n_wrap++;
      wp = (wp + 8) % 8192;
      foreach (act[k]) begin
        act[k].r |= lk; act[k].fl |= fl; act[k].fn |= fn; act[k].left--;
      end
      if (act[0].left == 0) begin
        exp_res.push_back('{fex_local: act[0].fl, fex_neigh: act[0].fn, ready: act[0].r,
                            offset: 13'(act[0].start)});
        void'(act.pop_front());
      end
    end
    // stimulus: software trigger a few clocks before the spied sample
    @(negedge clk);
    if (sw) begin sw_trig = 1; n_sw++; @(negedge clk); sw_trig = 0; end
    @(negedge clk); spy_valid = 1; spy_tr = tr;
    @(negedge clk); spy_valid = 0; spy_tr = 0;
    s_valid = 1; s_words = w; s_fex_local = fl; s_fex_neigh = fn; s_linkerr = lk;
    @(negedge clk); s_valid = 0;
    repeat (sw ? 12 : 13) @(negedge clk);
  endtask

  task automatic compare_mem(input string what);
    foreach (exp_mem[a]) check(got_mem.exists(a) && got_mem[a] == exp_mem[a], $sformatf("%s addr %0d", what, a));
    check(got_mem.size() == exp_mem.size(), $sformatf("%s: no stray writes", what));
  endtask

  initial begin
    int id = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); is_en = 1;
    // phase 1: short L1Accepts, frequent triggers (overlap and drops)
    samples = 10'd5;
    for (int i = 0; i < 400; i++) one_sample(($urandom % 3) == 0, 0, id++);
    for (int i = 0; i < 8; i++) one_sample(1, 0, id++);      // more than four overlapping
    repeat (20) one_sample(0, 0, id++);
    check(exp_res.size() == 0 && act.size() == 0, "phase 1 all results delivered");
    compare_mem("phase 1");
    // phase 2: software trigger disabled then enabled
    sw_trig_en = 0;
    for (int i = 0; i < 20; i++) one_sample(0, i == 3, id++);
    check(!gate, "disabled software trigger ignored");
    sw_trig_en = 1;
    for (int i = 0; i < 20; i++) one_sample(0, i == 3, id++);
    check(exp_res.size() == 0, "software trigger result delivered");
    // phase 3: 64-sample L1Accepts, run past the end of the buffer
    samples = 10'd64;
    for (int i = 0; i < 1300; i++) one_sample(($urandom % 40) == 0, 0, id++);
    repeat (70) one_sample(0, 0, id++);
    check(exp_res.size() == 0 && act.size() == 0, "phase 3 all results delivered");
    got_mem.delete(); exp_mem.delete();
    // phase 4: is_en low clears everything
    one_sample(1, 0, id++);
    @(negedge clk); is_en = 0; act.delete(); exp_res.delete(); wp = 0;
    @(negedge clk); is_en = 1;
    check(!gate, "is_en clears gate");
    got_mem.delete(); exp_mem.delete();
    samples = 10'd3;
    for (int i = 0; i < 10; i++) one_sample(i == 2, 0, id++);
    check(exp_res.size() == 0, "result after clear");
    compare_mem("phase 4");
    check(n_overlap > 0, "overlapping L1Accepts happened");
    check(n_drop > 0, "dropped L1Accept happened");
    check(n_drop_dut == n_drop, "l1a_drop pulses match the model");
    check(n_wrap > 0, "buffer wrap happened");
    check(n_sw > 0, "software trigger happened");
    $display("overlap=%0d drop=%0d wrap=%0d sw=%0d results=%0d", n_overlap, n_drop, n_wrap, n_sw, n_results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
