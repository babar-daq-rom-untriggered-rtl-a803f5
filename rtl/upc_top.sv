// upc_top -- untriggered personality card of the calorimeter read-out module.
//
// Up to three FLINKs each deliver one packet of 24 crystal digitisations
// every 16 clocks (3.7 MHz at the 59.5 MHz system clock).  Per FLINK the card
// corrects the digitisations through look-up tables, sends the trigger tower
// energy sum to the level-one trigger and its edge occupancy (FEX) bits to the
// neighbouring FLINKs, and keeps the untriggered sample stream in a presample
// buffer.  When an L1Accept is seen in the stream (or software triggers) the
// gate controller copies the samples around it into the FLINK's circular
// intermediate store and queues the start offset and summary flags for the
// controller card (CC); the i960 later reads the samples from the store.
//
// Structure: per FLINK a flink_resync moving the received words from the
// link's recovered clock (fl_clk) onto SYSCLK, then a flink_channel; a
// trigger_interface serialising the three sums, a cc_interface answering the
// CC, a register_file decoding the i960 bus, and led_stretcher instances for
// the front-panel LEDs.  After the resynchronisers everything runs on clk
// (SYSCLK); rst_n is an asynchronous active-low reset.  RXDET and the
// start-up state are slow levels read by software and are not synchronised.
//
// Ports: FLINK clock, words and link status per FLINK (fl_*), edge FEX bits to and
// from the backplane, the i960 slave bus (bus_*), the CC handshake, CLINK
// command strobe and link-status pins (cc_*), the trigger cable (trig_data
// per FLINK, trig_frame; the trigger clock is clk), the pins of the
// housekeeping ADC, LEDs, and per-FLINK error strobes (fl_ovf on the FLINK
// clock, the others on SYSCLK).  The G-LINK
// receivers, the housekeeping ADC, the CPU and the CC are outside this
// design and connect through these ports.
module upc_top
  import upc_pkg::*;
#(
  parameter int N_LUT          = 3,
  parameter int PRESAMPLE_MAX  = 128,
  parameter int IS_WORDS       = 1 << IS_AW,
  parameter int N_ACC          = 4,
  parameter int OUT_FIFO_DEPTH = 16,
  parameter int LED_STRETCH    = 1 << 21
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // DIP switches, identity
  input  logic [7:0]                         reg_base,
  input  logic [7:0]                         is_base,
  input  logic [7:0]                         serno,
  input  logic [15:0]                        location,
  // FLINK receivers
  input  logic [N_FLINK-1:0]                 fl_clk,
  input  logic [N_FLINK-1:0]                 fl_valid,
  input  logic [N_FLINK-1:0]                 fl_ctrl,
  input  logic [N_FLINK-1:0][WORD_W-1:0]     fl_word,
  input  logic [N_FLINK-1:0]                 fl_lrdy,
  input  logic [N_FLINK-1:0]                 fl_err,
  input  logic [N_FLINK-1:0]                 fl_rxdet,
  input  logic [N_FLINK-1:0][1:0]            fl_lst,
  // neighbour FEX bits via the backplane
  input  logic [N_FLINK-1:0][N_EDGE-1:0]     edge_in,
  output logic [N_FLINK-1:0][N_EDGE-1:0]     edge_out,
  // i960 bus
  input  logic [31:0]                        bus_addr,
  input  logic                               bus_rd,
  input  logic                               bus_wr,
  input  logic [3:0]                         bus_be,
  input  logic [31:0]                        bus_wdata,
  output logic [31:0]                        bus_rdata,
  output logic                               bus_rvalid,
  // controller card
  input  logic                               cc_rx_data,
  input  logic                               cc_rx_read,
  input  logic                               cc_pc_rd_n,
  output logic                               cc_done,
  output logic                               cc_pc_end,
  output logic [7:0]                         cc_status,
  output logic [15:0]                        cc_result,
  input  logic                               cc_clink_valid,
  input  logic [CLINK_OP_W-1:0]              cc_clink_op,
  output logic                               cc_n_clrdya, cc_n_clrdyb,
  output logic                               cc_n_dlrdya, cc_n_dlrdyb,
  output logic                               cc_dlerra, cc_dlerrb,
  output logic                               cc_n_cllcka, cc_n_cllckb,
  // trigger cable
  output logic [N_FLINK-1:0]                 trig_data,
  output logic                               trig_frame,
  // housekeeping ADC
  output logic                               adc_din,
  output logic                               adc_clk,
  output logic                               adc_cs_n,
  input  logic                               adc_dout,
  input  logic                               adc_sstrb,
  // front panel
  output logic                               led_i960,
  output logic                               led_clink,
  output logic [N_FLINK-1:0]                 led_flink_nrdy,
  // error strobes
  output logic [N_FLINK-1:0]                 sync_err,
  output logic [N_FLINK-1:0]                 l1a_drop,
  output logic [N_FLINK-1:0]                 of_ovf,
  output logic [N_FLINK-1:0]                 fl_ovf
);

  logic [N_FLINK-1:0]       en, off_din, off_sclk, off_dout;
  logic                     lut_en, is_en, sw_trig_en, sw_trig, trig_test;
  logic [SAMPLES_W-1:0]     samples;
  logic [DEPTH_W-1:0]       depth;
  logic [3:0]               frame_offset;
  lut_req_t   [N_FLINK-1:0] lut_req;
  lut_entry_t [N_FLINK-1:0] lut_rdata;
  is_req_t    [N_FLINK-1:0] is_req;
  logic [N_FLINK-1:0][31:0] is_rdata;
  logic [N_FLINK-1:0][ENERGY_W-1:0] tower_sum;
  logic [N_FLINK-1:0]       tower_valid, of_pop, of_empty, l1a_start, gate;
  result_t    [N_FLINK-1:0] of_head;
  logic                     sync, spy_start, activity, rx_read_err, playback_done;
  // FLINK words and status after the move onto SYSCLK
  logic [N_FLINK-1:0]       s_valid, s_ctrl, s_lrdy, s_err, lrdy_s, err_s;
  logic [N_FLINK-1:0][WORD_W-1:0] s_word;

  register_file u_regs (
    .clk, .rst_n, .reg_base, .is_base, .serno, .location,
    .bus_addr, .bus_rd, .bus_wr, .bus_be, .bus_wdata, .bus_rdata, .bus_rvalid,
    .activity, .en, .off_din, .off_sclk, .off_dout, .lut_en, .is_en, .sw_trig_en,
    .samples, .depth, .adc_din, .adc_clk, .adc_cs_n, .adc_dout, .adc_sstrb,
    .rxdet(fl_rxdet), .lrdy(lrdy_s), .lst(fl_lst), .trig_test, .frame_offset,
    .sw_trig, .lut_req, .lut_rdata, .is_req, .is_rdata);

  for (genvar f = 0; f < N_FLINK; f++) begin : g_flink
    flink_resync u_resync (
      .wclk(fl_clk[f]), .clk, .rst_n,
      .in_valid(fl_valid[f]), .in_ctrl(fl_ctrl[f]), .in_word(fl_word[f]),
      .in_lrdy(fl_lrdy[f]), .in_err(fl_err[f]), .overflow(fl_ovf[f]),
      .out_valid(s_valid[f]), .out_ctrl(s_ctrl[f]), .out_word(s_word[f]),
      .out_lrdy(s_lrdy[f]), .out_err(s_err[f]), .lrdy_s(lrdy_s[f]), .err_s(err_s[f]));

    flink_channel #(
      .N_LUT(N_LUT), .PRESAMPLE_MAX(PRESAMPLE_MAX), .IS_WORDS(IS_WORDS),
      .N_ACC(N_ACC), .OUT_FIFO_DEPTH(OUT_FIFO_DEPTH)
    ) u_chan (
      .clk, .rst_n, .is_en, .lut_en, .samples, .depth, .sw_trig, .sw_trig_en,
      .off_din(off_din[f]), .off_sclk(off_sclk[f]), .off_dout(off_dout[f]),
      .in_valid(s_valid[f]), .in_ctrl(s_ctrl[f]), .in_word(s_word[f]),
      .lrdy(s_lrdy[f]), .err(s_err[f]),
      .edge_in(edge_in[f]), .edge_out(edge_out[f]),
      .tower_sum(tower_sum[f]), .tower_valid(tower_valid[f]),
      .lut_req(lut_req[f]), .lut_rdata(lut_rdata[f]),
      .is_req(is_req[f]), .is_rdata(is_rdata[f]),
      .of_pop(of_pop[f]), .of_empty(of_empty[f]), .of_head(of_head[f]),
      .sync_err(sync_err[f]), .l1a_start(l1a_start[f]), .l1a_drop(l1a_drop[f]),
      .of_ovf(of_ovf[f]), .gate(gate[f]));

    led_stretcher #(.STRETCH(LED_STRETCH)) u_led_nrdy (
      .clk, .rst_n, .pulse(!lrdy_s[f]), .led(led_flink_nrdy[f]));
  end

  cc_interface u_cc (
    .clk, .rst_n, .en, .samples,
    .rx_data(cc_rx_data), .rx_read(cc_rx_read), .pc_rd_n(cc_pc_rd_n),
    .done(cc_done), .pc_end(cc_pc_end), .status(cc_status), .result(cc_result),
    .rx_read_err, .of_empty, .of_head, .of_pop,
    .clink_valid(cc_clink_valid), .clink_op(cc_clink_op), .sync, .spy_start,
    .fl_lrdy(lrdy_s), .fl_err(err_s),
    .n_clrdya(cc_n_clrdya), .n_clrdyb(cc_n_clrdyb),
    .n_dlrdya(cc_n_dlrdya), .n_dlrdyb(cc_n_dlrdyb),
    .dlerra(cc_dlerra), .dlerrb(cc_dlerrb),
    .n_cllcka(cc_n_cllcka), .n_cllckb(cc_n_cllckb));

  trigger_interface u_trig (
    .clk, .rst_n, .sync, .spy_start, .frame_offset, .trig_test, .serno,
    .tower_sum, .data(trig_data), .frame_out(trig_frame), .playback_done);

  led_stretcher #(.STRETCH(LED_STRETCH)) u_led_i960 (
    .clk, .rst_n, .pulse(activity), .led(led_i960));
  led_stretcher #(.STRETCH(LED_STRETCH)) u_led_clink (
    .clk, .rst_n, .pulse(cc_clink_valid), .led(led_clink));

endmodule
