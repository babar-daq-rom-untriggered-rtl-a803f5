// tb_upc_workloads -- the two store workloads of the card, run end to end at
// the default sizes through the i960 bus and the CC handshake.
//
// Phase 1, normal data taking: 64 samples per L1Accept, presample depth 20.
// Sixteen well separated L1Accepts are taken before the CC reads anything,
// which fills the 8k-word store exactly (16 x 512 words) and the 16-entry
// OUT_FIFOs; no overflow may be flagged.  Then the sixteen results are read
// with RX_DATA / PC_RD# and every window is checked in the store (all words
// of the first and last sample of each window, on all three FLINKs).
// Phase 2, source calibration: the store is cleared with ISEN, then 512
// samples per L1Accept at the largest presample depth (127).  Two L1Accepts
// fill the store; both windows are read back completely for FLINK A, and an
// RX_DATA with nothing pending must time out after 595 + 16 x 512 clocks.
module tb_upc_workloads;
  import upc_pkg::*;
  import upc_tb_pkg::*;

  localparam int NP = 2500;
  localparam logic [7:0] RB = 8'h30, IB = 8'h31;

  logic clk = 0, rst_n = 0;
  logic [2:0] fl_valid = 0, fl_ctrl = 0, fl_lrdy = 3'b111, fl_err = 0;
  logic [2:0][19:0] fl_word = '0;
  logic [2:0][9:0] edge_in = '0, edge_out;
  logic [31:0] bus_addr = '0, bus_wdata = '0, bus_rdata;
  logic bus_rd = 0, bus_wr = 0, bus_rvalid;
  logic cc_rx_data = 0, cc_pc_rd_n = 1, cc_done, cc_pc_end;
  logic [7:0] cc_status;
  logic [15:0] cc_result;
  logic cc_n_clrdya, cc_n_clrdyb, cc_n_dlrdya, cc_n_dlrdyb, cc_dlerra, cc_dlerrb, cc_n_cllcka, cc_n_cllckb;
  logic [2:0] trig_data;
  logic trig_frame, adc_din, adc_clk, adc_cs_n, led_i960, led_clink;
  logic [2:0] led_flink_nrdy, sync_err, l1a_drop, of_ovf;

  // recovered FLINK clocks: the system clock's frequency, each its own phase
  logic [2:0] fl_clk = '0;
  logic [2:0] fl_ovf;
  initial begin #1; forever #5 fl_clk[0] = ~fl_clk[0]; end
  initial begin #3; forever #5 fl_clk[1] = ~fl_clk[1]; end
  initial begin #8; forever #5 fl_clk[2] = ~fl_clk[2]; end

  upc_top dut (
    .clk, .rst_n, .reg_base(RB), .is_base(IB), .serno(8'h5A), .location(16'h0001),
    .fl_clk, .fl_valid, .fl_ctrl, .fl_word, .fl_lrdy, .fl_err, .fl_rxdet(3'b111), .fl_lst(6'd0),
    .edge_in, .edge_out, .bus_addr, .bus_rd, .bus_wr, .bus_be(4'hF), .bus_wdata, .bus_rdata, .bus_rvalid,
    .cc_rx_data, .cc_rx_read(1'b0), .cc_pc_rd_n, .cc_done, .cc_pc_end, .cc_status, .cc_result,
    .cc_clink_valid(1'b0), .cc_clink_op(4'd0), .cc_n_clrdya, .cc_n_clrdyb, .cc_n_dlrdya, .cc_n_dlrdyb,
    .cc_dlerra, .cc_dlerrb, .cc_n_cllcka, .cc_n_cllckb, .trig_data, .trig_frame,
    .adc_din, .adc_clk, .adc_cs_n, .adc_dout(1'b0), .adc_sstrb(1'b0),
    .led_i960, .led_clink, .led_flink_nrdy, .sync_err, .l1a_drop, .of_ovf, .fl_ovf);

  always #5 clk = ~clk;


  int checks = 0, failures = 0;
  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic bus_write(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_wdata = d; bus_wr = 1;
    @(negedge clk); bus_wr = 0;
  endtask
  task automatic bus_read(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_rd = 1;
    @(negedge clk); bus_rd = 0; d = bus_rdata;
  endtask

  // stimulus and reference records
  raw_sample_t pk [3][NP];
  logic [9:0] nfex [3][NP];
  logic [7:0][63:0] rec [3][NP];
  int n_sums [3] = '{0, 0, 0};
  int n_err_strobes = 0;
  logic [2:0] tv;
  assign tv = {dut.g_flink[2].u_chan.tower_valid, dut.g_flink[1].u_chan.tower_valid,
               dut.g_flink[0].u_chan.tower_valid};
  always @(posedge clk) if (rst_n) begin
    for (int f = 0; f < 3; f++) if (tv[f]) begin
      corr_sample_t c;
      logic [15:0] s;
      int k;
      k = n_sums[f];
      c = correct_model(f, pk[f][k]);
      s = sum_model(c, REF_OFFSET);
      rec[f][k] = record_model(c, s, edge_in[f]);
      n_sums[f]++;
    end
    n_err_strobes += $countones(of_ovf) + $countones(l1a_drop) + $countones(sync_err) + $countones(fl_ovf);
  end

  int np_sent = 0;
  task automatic send_packet();
    logic [2:0][15:0][19:0] w;
    int p;
    p = np_sent;
    for (int f = 0; f < 3; f++) w[f] = encode_packet(pk[f][p]);
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      fl_valid = 3'b111; fl_ctrl = {3{i == 0}};
      for (int f = 0; f < 3; f++) begin
        fl_word[f] = w[f][i];
        if (i == 15) edge_in[f] = nfex[f][p];
      end
    end
    @(negedge clk); fl_valid = 0; fl_ctrl = 0;
    repeat (14) @(negedge clk);
    np_sent++;
  endtask

  // the i960 view of one stored sample of a FLINK, through either mapping
  task automatic check_sample(input int f, input int off, input int k);
    logic [31:0] d;
    for (int i = 0; i < 8; i++)
      for (int h = 0; h < 2; h++) begin
        bus_read({IB, 5'd0, 2'(f), 17'd0} + 32'(((off + i) % 16384) * 8 + h * 4), d);
        check(d == (h ? rec[f][k][i][63:32] : rec[f][k][i][31:0]),
              $sformatf("IS FLINK %0d sample %0d word %0d.%0d", f, k, i, h));
      end
  endtask

  task automatic cc_read(output int wait_clk, output logic [7:0] st, output logic [2:0][15:0] res);
    wait_clk = 0;
    @(negedge clk); cc_rx_data = 1; @(negedge clk); cc_rx_data = 0;
    while (!cc_done && wait_clk < 20000) begin @(negedge clk); wait_clk++; end
    st = cc_status;
    for (int r = 0; r < 3; r++) begin
      @(negedge clk); cc_pc_rd_n = 0; @(negedge clk); cc_pc_rd_n = 1;
      res[r] = cc_result;
    end
  endtask

  // run one workload: n_l1a L1Accepts, `gap` packets apart, then read all
  task automatic workload(input int samples, input int depth, input int n_l1a, input int gap,
                          input bit full_a);
    int first, starts [$], w;
    logic [7:0] st;
    logic [2:0][15:0] res;
    // store reset, then the new sizes with ISEN set (all FLINKs enabled)
    bus_write({RB, 24'h4}, 32'h8880_0000 | (samples << 7) | depth);
    bus_write({RB, 24'h4}, 32'h8884_0000 | (samples << 7) | depth);
    first = np_sent + depth + 4;
    for (int j = 0; j < n_l1a; j++) begin
      for (int f = 0; f < 3; f++) pk[f][first + j * gap].st.tr = 1'b1;
      starts.push_back(j * samples * 8 % 8192);
    end
    while (np_sent < first + (n_l1a - 1) * gap + samples + depth + 2) send_packet();
    // everything is in the store before the CC asks for any of it
    for (int j = 0; j < n_l1a; j++) begin
      int k0;
      k0 = first + j * gap - depth;   // sample stored first for this L1Accept
      cc_read(w, st, res);
      check(st == 8'h00, $sformatf("L1Accept %0d status %h", j, st));
      for (int f = 0; f < 3; f++)
        check(res[f][12:0] == 13'(starts[j]), $sformatf("L1Accept %0d FLINK %0d offset %h", j, f, res[f]));
      for (int s = 0; s < samples; s++)
        if (s == 0 || s == samples - 1 || full_a)
          for (int f = 0; f < 3; f++)
            if (f == 0 || s == 0 || s == samples - 1)
              check_sample(f, starts[j] + 8 * s, k0 + s);
    end
    cc_read(w, st, res);
    check(st == 8'h07 && w >= 595 + 16 * samples && w <= 595 + 16 * samples + 3,
          $sformatf("timeout status %h after %0d clocks", st, w));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NP; p++)
      for (int f = 0; f < 3; f++) begin
        for (int n = 0; n < N_CRYSTAL; n++) pk[f][p].dig[n] = {2'($urandom % 3), 10'($urandom)};
        pk[f][p].st = fe_status_t'($urandom);
        pk[f][p].st.tr = 1'b0;
        pk[f][p].linkerr = 1'b0;
        nfex[f][p] = ($urandom % 8 == 0) ? 10'($urandom) : '0;
      end
    // tables and offsets
    bus_write({RB, 24'h4}, 32'h0008_0000);
    for (int f = 0; f < 3; f++)
      for (int p = 0; p < NP; p++)
        for (int n = 0; n < N_CRYSTAL; n++)
          bus_write({RB, 2'b00, 1'b1, 2'(f), 5'(n), pk[f][p].dig[n], 2'b00},
                    32'(lut_model(f, n, pk[f][p].dig[n])));
    for (int i = 0; i < 16; i++) begin
      bus_write({RB, 24'h4}, 32'h0008_0000 | (REF_OFFSET[i] ? 32'h4440_0000 : 32'h0));
      bus_write({RB, 24'h4}, 32'h0008_0000 | (REF_OFFSET[i] ? 32'h4440_0000 : 32'h0) | 32'h2220_0000);
    end
    // normal data taking: 16 x 64 samples fill the store
    workload(64, 20, 16, 70, 1'b0);
    $display("64-sample workload done at packet %0d, checks %0d failures %0d", np_sent, checks, failures);
    // source calibration: 2 x 512 samples at the largest presample depth
    workload(512, 127, 2, 520, 1'b1);
    check(n_err_strobes == 0, "no overflow, drop or sync error");
    $display("packets %0d", np_sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
