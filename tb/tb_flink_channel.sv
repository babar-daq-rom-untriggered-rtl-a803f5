// tb_flink_channel -- self-checking test of one FLINK's processing chain.
//
// Loads the tables (lut_model) for every code the test will use and the LUT
// offset through the serial offset bits, then streams 300 back-to-back
// packets (one word per clock, 16 clocks per sample) with random codes,
// status, link errors, neighbour FEX bits and L1Accepts.  Every tower sum
// and edge FEX output is compared with the reference.  A gate model
// (presample depth 10, 20 samples per L1Accept, retriggerable) predicts the
// results in the OUT_FIFO; the stored samples are read back through the
// i960 port and compared word by word with record_model.  Also checks that
// the whole chain keeps up with one packet every 16 clocks, and that
// saturation, overlapping L1Accepts and link errors all occurred.
module tb_flink_channel;
  import upc_pkg::*;
  import upc_tb_pkg::*;

  localparam int NP = 300, D = 10, S = 20;

  logic clk = 0, rst_n = 0, is_en = 0, lut_en = 1;
  logic [9:0] samples = 10'(S);
  logic [6:0] depth = 7'(D);
  logic sw_trig = 0, sw_trig_en = 0, off_din = 0, off_sclk = 0, off_dout;
  logic in_valid = 0, in_ctrl = 0, lrdy = 1, err = 0;
  logic [19:0] in_word = '0;
  logic [9:0] edge_in = '0, edge_out;
  logic [15:0] tower_sum;
  logic tower_valid;
  lut_req_t lut_req = '0;
  lut_entry_t lut_rdata;
  is_req_t is_req = '0;
  logic [31:0] is_rdata;
  logic of_pop = 0, of_empty;
  result_t of_head;
  logic sync_err, l1a_start, l1a_drop, of_ovf, gate;
  int checks = 0, failures = 0;
  int n_sat = 0, n_overlap = 0, n_linkerr = 0, n_sums = 0;

  flink_channel dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  raw_sample_t pk [NP];
  logic [9:0]  nfex [NP];
  logic [7:0][63:0] rec [NP];

  // tower sum / edge monitor
  always @(posedge clk) if (rst_n && tower_valid) begin
    corr_sample_t c;
    logic [15:0] es;
    c = correct_model(0, pk[n_sums]);
    es = sum_model(c, REF_OFFSET);
    check(tower_sum == es, $sformatf("tower sum %0d exp %h got %h", n_sums, es, tower_sum));
    check(edge_out == edge_model(c.fex), $sformatf("edge FEX %0d", n_sums));
    if (es == 16'hFFFF) n_sat++;
    rec[n_sums] = record_model(c, es, edge_in);
    n_sums++;
  end

  initial begin
    int wp, n_tr;
    int stored [$];
    typedef struct { int start; int left; bit r, fl, fn; } l1a_t;
    l1a_t act [$];
    result_t exp_res [$];
    wp = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // packets (at most 15 L1Accepts, so the 16-entry OUT_FIFO never fills)
    n_tr = 0;
    for (int p = 0; p < NP; p++) begin
      for (int n = 0; n < N_CRYSTAL; n++) begin
        pk[p].dig[n] = 12'($urandom);
        if (pk[p].dig[n][11:10] == 2'd3 && ($urandom % 8) != 0) pk[p].dig[n][11:10] = 2'd0;
      end
      pk[p].st = fe_status_t'($urandom);
      pk[p].st.tr = (p > D + 2) && (p < NP - S - D - 5) && ($urandom % 12 == 0) && n_tr < 15;
      if (pk[p].st.tr) n_tr++;
      pk[p].linkerr = ($urandom % 25) == 0;
      nfex[p] = ($urandom % 6 == 0) ? 10'($urandom) : '0;
    end
    // tables
    for (int p = 0; p < NP; p++)
      for (int n = 0; n < N_CRYSTAL; n++) begin
        @(negedge clk);
        lut_req = '0; lut_req.wr = 1; lut_req.crystal = 5'(n); lut_req.dig = pk[p].dig[n];
        lut_req.be = 3'b111; lut_req.wdata = lut_model(0, n, pk[p].dig[n]);
      end
    @(negedge clk); lut_req = '0;
    // offset, LSB first
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); off_din = REF_OFFSET[i]; off_sclk = 0;
      @(negedge clk); off_sclk = 1;
    end
    @(negedge clk); off_sclk = 0;
    check(dut.offset == REF_OFFSET, "offset loaded");
    lut_en = 0; is_en = 1;
    // stream
    for (int p = 0; p < NP; p++) begin
      logic [15:0][19:0] w;
      int ew;
      w  = encode_packet(pk[p]);
      ew = pk[p].linkerr ? int'($urandom % 16) : -1;
      if (pk[p].linkerr) n_linkerr++;
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        in_valid = 1; in_ctrl = (i == 0); in_word = w[i]; err = (i == ew);
        if (i == 14) edge_in = nfex[p];   // stable when this packet's sum is formed
      end
    end
    @(negedge clk); in_valid = 0; err = 0;
    repeat (40) @(negedge clk);
    check(n_sums == NP, $sformatf("one sum per packet (%0d)", n_sums));
    // gate model over the stored samples
    for (int k = 0; k < NP; k++) begin
      corr_sample_t c;
      if (pk[k].st.tr && act.size() < 4) begin
        if (act.size() > 0) n_overlap++;
        act.push_back('{start: wp, left: S, r: 0, fl: 0, fn: 0});
      end
      if (act.size() > 0) begin
        c = correct_model(0, pk[k - D]);
        foreach (act[j]) begin
          act[j].r |= pk[k - D].linkerr; act[j].fl |= (c.fex != 0);
          act[j].fn |= (rec[k - D][7][9:0] != 0); act[j].left--;
        end
        wp += 8;
        stored.push_back(k);
        if (act[0].left == 0) begin
          exp_res.push_back('{fex_local: act[0].fl, fex_neigh: act[0].fn, ready: act[0].r,
                              offset: 13'(act[0].start)});
          void'(act.pop_front());
        end
      end
    end
    check(exp_res.size() > 3, "several L1Accepts");
    // results and stored data
    while (exp_res.size() > 0) begin
      result_t e;
      e = exp_res.pop_front();
      check(!of_empty && of_head == e, $sformatf("result exp %h got %h", e, of_head));
      @(negedge clk); of_pop = 1; @(negedge clk); of_pop = 0;
    end
    check(of_empty, "no extra results");
    // stored samples, in the order the gate model wrote them
    foreach (stored[j]) begin
      int k;
      k = stored[j];
      for (int i = 0; i < 8; i++)
        for (int h = 0; h < 2; h++) begin
          logic [31:0] exp32;
          exp32 = h ? rec[k - D][i][63:32] : rec[k - D][i][31:0];
          @(negedge clk); is_req.rd = 1; is_req.offset = 13'(8*j + i); is_req.hi = h[0];
          @(negedge clk); is_req.rd = 0;
          check(is_rdata == exp32, $sformatf("IS sample %0d word %0d.%0d", k - D, i, h));
        end
    end
    check(n_sat > 0, "saturated tower sum happened");
    check(n_overlap > 0, "overlapping L1Accepts happened");
    check(n_linkerr > 0, "link error happened");
    check(!sync_err && !l1a_drop && !of_ovf, "no error strobes");
    $display("sat=%0d overlap=%0d linkerr=%0d", n_sat, n_overlap, n_linkerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
