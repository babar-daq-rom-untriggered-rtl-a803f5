// tb_upc_top -- end-to-end test of the untriggered personality card at its
// default sizes (8k-word stores, 128-sample presample buffers, 4
// accumulators, 16-entry OUT_FIFOs, 3 x 32k-entry tables per FLINK).
//
// Software steps go through the i960 bus: load the tables of all three
// FLINKs for the codes used, shift in the LUT offsets through CTRL, enable
// the FLINKs and the store (64 samples per L1Accept, presample depth 8).
// 1150 packets then stream on all three FLINKs with a small skew between
// them.  L1Accepts (the Tr bit) arrive every ~66 packets, one pair overlaps,
// a burst of five close ones makes the fifth be dropped (four accumulators)
// and one extra comes from the SWTRIG register.  After each completed
// L1Accept the testbench plays the controller card: RX_DATA, wait for DONE,
// three PC_RD# strobes; every result word is compared with a reference gate
// model, and the 64 stored samples of FLINK A (all 1024 32-bit words) plus
// the first and last sample of B and C are read back through the IS window,
// using the second (alias) mapping for a block that wraps around the end of
// the store.  A receiver on the trigger cable checks every serial word
// against the tower-sum reference, then the test pattern is played back.
// Also covered: RX_READ, an RX_DATA timeout, link-error and not-ready
// reporting, and the LEDs.  Each mechanism is counted and must occur.
module tb_upc_top;
  import upc_pkg::*;
  import upc_tb_pkg::*;

  localparam int NP = 1150, D = 8, S = 64;
  localparam logic [7:0] RB = 8'h40, IB = 8'h41;
  localparam int SKEW [3] = '{0, 3, 1};

  logic clk = 0, rst_n = 0;
  logic [2:0] fl_valid = 0, fl_ctrl = 0, fl_lrdy = 3'b111, fl_err = 0, fl_rxdet = 3'b111;
  logic [2:0][19:0] fl_word = '0;
  logic [2:0][1:0] fl_lst = '0;
  logic [2:0][9:0] edge_in = '0, edge_out;
  logic [31:0] bus_addr = '0, bus_wdata = '0, bus_rdata;
  logic bus_rd = 0, bus_wr = 0, bus_rvalid;
  logic [3:0] bus_be = 4'hF;
  logic cc_rx_data = 0, cc_rx_read = 0, cc_pc_rd_n = 1, cc_done, cc_pc_end;
  logic [7:0] cc_status;
  logic [15:0] cc_result;
  logic cc_clink_valid = 0;
  logic [3:0] cc_clink_op = '0;
  logic cc_n_clrdya, cc_n_clrdyb, cc_n_dlrdya, cc_n_dlrdyb, cc_dlerra, cc_dlerrb, cc_n_cllcka, cc_n_cllckb;
  logic [2:0] trig_data;
  logic trig_frame;
  logic adc_din, adc_clk, adc_cs_n;
  logic led_i960, led_clink;
  logic [2:0] led_flink_nrdy, sync_err, l1a_drop, of_ovf;

  // recovered FLINK clocks: the system clock's frequency, each its own phase
  logic [2:0] fl_clk = '0;
  logic [2:0] fl_ovf;
  initial begin #1; forever #5 fl_clk[0] = ~fl_clk[0]; end
  initial begin #3; forever #5 fl_clk[1] = ~fl_clk[1]; end
  initial begin #8; forever #5 fl_clk[2] = ~fl_clk[2]; end

  upc_top dut (
    .clk, .rst_n, .reg_base(RB), .is_base(IB), .serno(8'hC5), .location(16'h0BEE),
    .fl_clk, .fl_valid, .fl_ctrl, .fl_word, .fl_lrdy, .fl_err, .fl_rxdet, .fl_lst,
    .edge_in, .edge_out, .bus_addr, .bus_rd, .bus_wr, .bus_be, .bus_wdata, .bus_rdata, .bus_rvalid,
    .cc_rx_data, .cc_rx_read, .cc_pc_rd_n, .cc_done, .cc_pc_end, .cc_status, .cc_result,
    .cc_clink_valid, .cc_clink_op, .cc_n_clrdya, .cc_n_clrdyb, .cc_n_dlrdya, .cc_n_dlrdyb,
    .cc_dlerra, .cc_dlerrb, .cc_n_cllcka, .cc_n_cllckb, .trig_data, .trig_frame,
    .adc_din, .adc_clk, .adc_cs_n, .adc_dout(1'b0), .adc_sstrb(1'b0),
    .led_i960, .led_clink, .led_flink_nrdy, .sync_err, .l1a_drop, .of_ovf, .fl_ovf);

  always #5 clk = ~clk;


  int checks = 0, failures = 0;
  int n_overlap = 0, n_sw = 0, n_sat = 0, n_timeout = 0, n_wrap = 0, n_linkerr = 0,
      n_l1a = 0, n_rxread = 0, n_pattern = 0, n_trigwords = 0, n_nrdy = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- i960
  task automatic bus_write(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_wdata = d; bus_wr = 1;
    @(negedge clk); bus_wr = 0;
  endtask
  task automatic bus_read(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_rd = 1;
    @(negedge clk); bus_rd = 0; d = bus_rdata;
  endtask

  // --------------------------------------------------------------- stimulus
  raw_sample_t pk [3][NP];
  logic [9:0] nfex [3][NP];
  logic [7:0][63:0] rec [3][NP];
  logic [15:0] sums [3][NP];
  int n_sums [3] = '{0, 0, 0};
  logic [2:0] tv;
  assign tv = {dut.g_flink[2].u_chan.tower_valid, dut.g_flink[1].u_chan.tower_valid,
               dut.g_flink[0].u_chan.tower_valid};

  // reference for every sample as its tower sum is formed
  always @(posedge clk) if (rst_n) for (int f = 0; f < 3; f++) if (tv[f]) begin
    corr_sample_t c;
    int k;
    k = n_sums[f];
    c = correct_model(f, pk[f][k]);
    sums[f][k] = sum_model(c, REF_OFFSET);
    if (sums[f][k] == 16'hFFFF) n_sat++;
    rec[f][k] = record_model(c, sums[f][k], edge_in[f]);
    check(dut.tower_sum[f] == sums[f][k], $sformatf("tower sum FLINK %0d sample %0d", f, k));
    n_sums[f]++;
  end

  // trigger cable receiver
  logic [2:0][15:0] sh;
  int bitn = -1;
  logic [2:0][15:0] words [$];
  always @(posedge clk) if (rst_n) begin
    if (trig_frame) bitn = 0;
    if (bitn >= 0) begin
      for (int f = 0; f < 3; f++) sh[f][bitn] = trig_data[f];
      bitn++;
      if (bitn == 16) begin words.push_back(sh); bitn = -1; end
    end
  end
  int tptr [3] = '{-1, -1, -1};
  bit test_mode = 0;
  always @(posedge clk) while (!test_mode && words.size() > 0) begin
    logic [2:0][15:0] w;
    w = words.pop_front();
    for (int f = 0; f < 3; f++) begin
      logic [15:0] cur;
      cur = (tptr[f] < 0) ? 16'h0 : sums[f][tptr[f]];
      if (w[f] != cur) begin
        // step forward past sums equal to the current one
        int j;
        j = tptr[f] + 1;
        while (j + 1 < n_sums[f] && sums[f][j] == cur && w[f] != cur) j++;
        if (j < n_sums[f] && w[f] == sums[f][j]) tptr[f] = j;
        else check(0, $sformatf("trigger word FLINK %0d: %h ptr %0d n %0d cur %h next %h %h t=%0t", f, w[f], tptr[f], n_sums[f], cur, sums[f][tptr[f]+1], sums[f][tptr[f]+2], $time));
      end
      n_trigwords++;
    end
  end

  task automatic send_packets(input int p, input bit lrdy_b_low);
    logic [2:0][15:0][19:0] w;
    int ew [3];
    for (int f = 0; f < 3; f++) begin
      w[f] = encode_packet(pk[f][p]);
      ew[f] = pk[f][p].linkerr ? 5 : -1;
    end
    for (int t = 0; t < 16 + 3; t++) begin
      @(negedge clk);
      for (int f = 0; f < 3; f++) begin
        int i;
        i = t - SKEW[f];
        fl_valid[f] = (i >= 0 && i < 16);
        fl_ctrl[f]  = (i == 0);
        fl_word[f]  = (i >= 0 && i < 16) ? w[f][i] : 20'h0;
        fl_err[f]   = (i == ew[f]);
        if (i == 15) edge_in[f] = nfex[f][p];
      end
      fl_lrdy[1] = !(lrdy_b_low && t > 2 && t < 10);
    end
    @(negedge clk); fl_valid = 0; fl_err = 0; fl_lrdy = 3'b111;
    // wait until this packet's tower sums (and the stored sample) are done
    repeat (14) @(negedge clk);
  endtask

  // ------------------------------------------------------------- CC side
  task automatic cc_transaction(output int wait_clk, output logic [7:0] st,
                                output logic [2:0][15:0] res);
    wait_clk = 0;
    @(negedge clk); cc_rx_data = 1; @(negedge clk); cc_rx_data = 0;
    while (!cc_done && wait_clk < 10000) begin @(negedge clk); wait_clk++; end
    st = cc_status;
    for (int r = 0; r < 3; r++) begin
      @(negedge clk); cc_pc_rd_n = 0; @(negedge clk); cc_pc_rd_n = 1;
      res[r] = cc_result;
      check(cc_pc_end == (r == 2), "PC_END with the third word");
    end
  endtask

  task automatic clink(input logic [3:0] op);
    @(negedge clk); cc_clink_valid = 1; cc_clink_op = op;
    @(negedge clk); cc_clink_valid = 0;
  endtask

  // --------------------------------------------------------- gate model
  typedef struct { int start; int left; bit r[3]; bit fl[3]; bit fn[3]; } l1a_t;
  l1a_t act [$];
  int n_drop_model = 0, n_drop = 0;
  int n_bad_strobe = 0;
  always @(posedge clk) if (rst_n) begin
    n_drop += $countones(l1a_drop);
    n_bad_strobe += $countones(sync_err) + $countones(of_ovf) + $countones(fl_ovf);
  end
  l1a_t done_q [$];
  int wp = 0;
  int stored_at [int];     // IS word offset -> stored sample index

  task automatic model_strobe(input int k, input bit trig);
    if (trig && act.size() == 4) n_drop_model++;
    if (trig && act.size() < 4) begin
      l1a_t a;
      a.start = wp; a.left = S;
      for (int f = 0; f < 3; f++) begin a.r[f] = 0; a.fl[f] = 0; a.fn[f] = 0; end
      if (act.size() > 0) n_overlap++;
      act.push_back(a);
    end
    if (act.size() > 0) begin
      stored_at[wp] = k - D;
      foreach (act[j]) begin
        for (int f = 0; f < 3; f++) begin
          act[j].r[f]  |= pk[f][k - D].linkerr;
          act[j].fl[f] |= (rec[f][k - D][6][47:24] != 0);
          act[j].fn[f] |= (rec[f][k - D][7][9:0] != 0);
        end
        act[j].left--;
      end
      wp = (wp + 8) % 8192;
      if (act[0].left == 0) done_q.push_back(act.pop_front());
    end
  endtask

  task automatic read_sample(input int f, input int off, input int k, input bit use_alias);
    logic [31:0] d;
    for (int i = 0; i < 8; i++)
      for (int h = 0; h < 2; h++) begin
        int o;
        o = off + i;
        bus_read({IB, 5'd0, 2'(f), use_alias ? 1'b1 : 1'b0, 16'd0} + 32'((o % 16384) * 8 + h * 4), d);
        check(d == (h ? rec[f][k][i][63:32] : rec[f][k][i][31:0]),
              $sformatf("IS FLINK %0d sample %0d word %0d.%0d", f, k, i, h));
      end
  endtask

  task automatic readout();
    int w; logic [7:0] st; logic [2:0][15:0] res;
    l1a_t e;
    e = done_q.pop_front();
    cc_transaction(w, st, res);
    check(st == 8'h00, $sformatf("status %h", st));
    for (int f = 0; f < 3; f++) begin
      result_t exp_r;
      exp_r = '{fex_local: e.fl[f], fex_neigh: e.fn[f], ready: e.r[f], offset: 13'(e.start)};
      check(res[f] == exp_r, $sformatf("result FLINK %0d exp %h got %h", f, exp_r, res[f]));
    end
    // samples of FLINK A; B and C first and last
    begin
      bit wraps;
      wraps = e.start + 8 * S > 8192;
      if (wraps) n_wrap++;
      for (int s = 0; s < S; s++) begin
        int a;
        a = (e.start + 8 * s) % 8192;
        // a block that wraps is read linearly through the second mapping
        read_sample(0, wraps ? e.start + 8 * s : a, stored_at[a], 1'b0);
        if (s == 0 || s == S - 1)
          for (int f = 1; f < 3; f++) read_sample(f, wraps ? e.start + 8 * s : a, stored_at[a], 1'b0);
      end
    end
    n_l1a++;
  endtask

  // --------------------------------------------------------------- main
  initial begin
    logic [31:0] d;
    int w; logic [7:0] st; logic [2:0][15:0] res;
    int n_tr;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // packets: L1Accepts every 66 packets from 30 on, one overlapping pair
    for (int p = 0; p < NP; p++) begin
      fe_status_t stt;
      stt = fe_status_t'($urandom);
      stt.tr = (p >= 30 && (p - 30) % 66 == 0) || p == 30 + 66*3 + 20 ||
               (p > 30 + 66*14 && p <= 30 + 66*14 + 8 && p % 2 == 0);
      for (int f = 0; f < 3; f++) begin
        for (int n = 0; n < N_CRYSTAL; n++) begin
          pk[f][p].dig[n] = 12'($urandom);
          if (pk[f][p].dig[n][11:10] == 2'd3 && ($urandom % 10) != 0) pk[f][p].dig[n][11:10] = 2'd1;
        end
        pk[f][p].st = stt;
        pk[f][p].linkerr = ($urandom % 60) == 0 || (f == 1 && p == 200);
        nfex[f][p] = ($urandom % 8 == 0) ? 10'($urandom) : '0;
      end
    end
    // tables, through the bus, LUTEN = 1
    bus_write({RB, 24'h4}, 32'h0008_0000);
    for (int f = 0; f < 3; f++)
      for (int p = 0; p < NP; p++)
        for (int n = 0; n < N_CRYSTAL; n++)
          bus_write({RB, 2'b00, 1'b1, 2'(f), 5'(n), pk[f][p].dig[n], 2'b00},
                    32'(lut_model(f, n, pk[f][p].dig[n])));
    // spot check table read-back
    bus_read({RB, 2'b00, 1'b1, 2'd2, 5'd7, pk[2][5].dig[7], 2'b00}, d);
    check(d == 32'(lut_model(2, 7, pk[2][5].dig[7])), "LUT read-back");
    // offsets: DIN then CLK, for all three FLINKs at once
    for (int i = 0; i < 16; i++) begin
      logic [31:0] din;
      din = REF_OFFSET[i] ? 32'h4440_0000 : 32'h0;
      bus_write({RB, 24'h4}, 32'h0008_0000 | din);
      bus_write({RB, 24'h4}, 32'h0008_0000 | din | 32'h2220_0000);
    end
    bus_write({RB, 24'h4}, 32'h0008_0000);
    bus_read({RB, 24'h4}, d);
    check(d[28] == REF_OFFSET[0] && d[24] == REF_OFFSET[0] && d[20] == REF_OFFSET[0], "DOUT bits");
    // run: ENA/B/C, ISEN, SWTRIGEN, SAMPLES = 64, DEPTH = 8
    bus_write({RB, 24'h4}, 32'h8880_0000 | 32'h0006_0000 | (S << 7) | D);
    bus_write({RB, 24'hC}, 32'h3);                 // frame offset 3, energy mode
    bus_read({RB, 24'h0}, d);
    check(d == 32'hC501_0BEE, $sformatf("SERNO %h", d));
    clink(OP_SYNC);
    check(led_clink && led_i960, "CLINK and i960 LEDs lit");
    // RX_READ is answered at once
    @(negedge clk); cc_rx_read = 1; @(negedge clk); cc_rx_read = 0;
    check(cc_done && cc_pc_end, "RX_READ answered");
    n_rxread++;
    // stream
    n_tr = 0;
    for (int p = 0; p < NP; p++) begin
      bit sw;
      sw = (p == 30 + 66*5 + 33);
      if (sw) begin
        bus_write({RB, 24'h10}, 0);                 // software trigger
        n_sw++;
      end
      send_packets(p, p == 200);
      if (p == 200) begin
        n_nrdy++;
        check(led_flink_nrdy[1], "FLINK B not-ready LED");
      end
      for (int f = 0; f < 3; f++) if (pk[f][p].linkerr) n_linkerr++;
      model_strobe(p, pk[0][p].st.tr || sw);
      while (done_q.size() > 0) readout();
    end
    check(n_sums[0] == NP && n_sums[1] == NP && n_sums[2] == NP, "all samples summed");
    check(n_bad_strobe == 0, "no FLINK sync errors or OUT_FIFO overflows");
    check(n_drop == 3 * n_drop_model, $sformatf("dropped L1Accepts %0d, model %0d", n_drop, n_drop_model));
    // no L1Accept pending: RX_DATA times out after 10 us + 64 samples
    cc_transaction(w, st, res);
    check(st == 8'h07 && res == '0, $sformatf("timeout status %h", st));
    check(w >= 595 + 16 * S && w <= 595 + 16 * S + 3, $sformatf("timeout after %0d clocks", w));
    n_timeout++;
    // link status pins: FLINK A error visible, gated off when disabled
    @(negedge clk); fl_err = 3'b001; repeat (3) @(negedge clk);
    check(cc_dlerra && !cc_n_dlrdya && !cc_n_clrdya, "FLINK A status on the CC pins");
    bus_write({RB, 24'h4}, 32'h8800_0000 | (S << 7) | D);   // ENA off, ISEN off
    #1 check(!cc_dlerra && cc_n_dlrdya, "disabled FLINK gated");
    fl_err = 0;
    // trigger test pattern
    repeat (40) @(negedge clk);
    test_mode = 1;
    bus_write({RB, 24'hC}, 32'h13);
    repeat (40) @(negedge clk);
    words.delete();
    clink(OP_SPY_START);
    repeat (80) @(negedge clk);
    begin
      int k;
      k = -1;
      for (int i = 0; i < words.size(); i++) if (words[i] != '0) begin k = i; break; end
      check(k >= 0 && k + 1 < words.size(), "test pattern seen");
      if (k >= 0 && k + 1 < words.size()) begin
        for (int f = 0; f < 3; f++) begin
          logic [15:0] walk;
          for (int i = 0; i < 16; i++) walk[i] = (i % 3) == ((f + 1) % 3);
          check(words[k][f] == walk, "walking-one word");
          check(words[k + 1][f] == {6'd0, 2'(f), 8'hC5}, "serial-number word");
        end
        n_pattern++;
      end
    end
    $display("drop=%0d l1a=%0d overlap=%0d sw=%0d sat=%0d wrap=%0d timeout=%0d linkerr=%0d rxread=%0d pattern=%0d trigwords=%0d nrdy=%0d",
             n_drop_model, n_l1a, n_overlap, n_sw, n_sat, n_wrap, n_timeout, n_linkerr, n_rxread, n_pattern, n_trigwords, n_nrdy);
    check(n_l1a >= 15, "L1Accepts read out");
    check(n_overlap > 0, "overlapping L1Accept (gate extended)");
    check(n_drop_model > 0, "fifth overlapping L1Accept dropped");
    check(n_sw > 0, "software trigger");
    check(n_sat > 0, "tower sum saturation");
    check(n_wrap > 0, "block wrapping the store, read through the alias");
    check(n_timeout > 0, "RX_DATA timeout");
    check(n_linkerr > 0, "link error");
    check(n_rxread > 0, "RX_READ");
    check(n_pattern > 0, "trigger test pattern");
    check(n_trigwords > 100, "trigger words received");
    check(n_nrdy > 0, "link not ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
