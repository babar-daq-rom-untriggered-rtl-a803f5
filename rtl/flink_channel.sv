// flink_channel -- all processing for one FLINK, from received words to the
// intermediate store and the result FIFO.
//
// Data path, one sample (packet) every 16 clocks:
//   flink_deformatter  -> 24 raw codes + front-end status
//   lut_correction     -> 24 offset-binary energies with ADD/FEX flags
//   trigger_summer     -> tower sum (offset removed, ADD-gated, saturating)
//   edge_fex           -> ten edge FEX bits to the neighbours
//   pack_sample        -> eight 64-bit words (energies, flags, sum, incoming
//                         neighbour FEX bits, front-end and link status)
//   presample_buffer   -> delay of `depth` samples
//   gate_controller    -> writes gated samples into the circular buffer and
//                         pushes one result per L1Accept into the OUT_FIFO
//   circular_buffer    -> 8k x 64 intermediate store, read by the i960
// The LUT offset is held in an offset_sreg loaded through control-register
// bits.  The gate controller spies on Tr of the sample entering the presample
// buffer, so the stored samples start `depth` samples before the L1Accept.
//
// Interface: FLINK words (in_*), link status, edge FEX in/out, the tower sum
// (changes once per sample, tower_valid pulses when it does), i960 ports for
// the LUT and the IS, and the OUT_FIFO head/pop for the CC interface.  is_en
// low clears the gate controller and the OUT_FIFO.
//
// The block structure follows the document's per-FLINK diagrams.  Running the
// whole channel on the system clock, with the received words presented one
// per clock with a valid strobe, is this design's simplification of the
// recovered-clock domain of the G-LINK receiver.
module flink_channel
  import upc_pkg::*;
#(
  parameter int N_LUT          = 3,
  parameter int PRESAMPLE_MAX  = 128,
  parameter int IS_WORDS       = 1 << IS_AW,
  parameter int N_ACC          = 4,
  parameter int OUT_FIFO_DEPTH = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // control register fields
  input  logic                 is_en,
  input  logic                 lut_en,
  input  logic [SAMPLES_W-1:0] samples,
  input  logic [DEPTH_W-1:0]   depth,
  input  logic                 sw_trig,
  input  logic                 sw_trig_en,
  input  logic                 off_din,
  input  logic                 off_sclk,
  output logic                 off_dout,
  // FLINK receiver
  input  logic                 in_valid,
  input  logic                 in_ctrl,
  input  logic [WORD_W-1:0]    in_word,
  input  logic                 lrdy,
  input  logic                 err,
  // neighbours and trigger
  input  logic [N_EDGE-1:0]    edge_in,
  output logic [N_EDGE-1:0]    edge_out,
  output logic [ENERGY_W-1:0]  tower_sum,
  output logic                 tower_valid,
  // i960
  input  lut_req_t             lut_req,
  output lut_entry_t           lut_rdata,
  input  is_req_t              is_req,
  output logic [31:0]          is_rdata,
  // CC interface
  input  logic                 of_pop,
  output logic                 of_empty,
  output result_t              of_head,
  // status
  output logic                 sync_err,
  output logic                 l1a_start,
  output logic                 l1a_drop,
  output logic                 of_ovf,
  output logic                 gate
);

  localparam int ISW = $clog2(IS_WORDS);

  raw_sample_t  raw;
  logic         raw_valid;
  corr_sample_t corr;
  logic         corr_valid;
  logic [ENERGY_W-1:0] offset;
  logic [N_EDGE-1:0]   edge_now;
  logic         fex_any_unused, neigh_any_unused;

  flink_deformatter u_deform (
    .clk, .rst_n, .in_valid, .in_ctrl, .in_word, .lrdy, .err,
    .out_valid(raw_valid), .out(raw), .sync_err);

  lut_correction #(.N_LUT(N_LUT)) u_lut (
    .clk, .rst_n, .lut_en, .in_valid(raw_valid), .in(raw),
    .out_valid(corr_valid), .out(corr), .lut_req, .lut_rdata);

  offset_sreg #(.WIDTH(ENERGY_W)) u_offset (
    .clk, .din(off_din), .sclk(off_sclk), .dout(off_dout), .value(offset));

  trigger_summer #(.N(N_CRYSTAL)) u_sum (
    .clk, .rst_n, .in_valid(corr_valid), .energy(corr.energy), .add(corr.add),
    .offset, .out_valid(tower_valid), .sum(tower_sum));

  edge_fex u_edge (
    .fex(corr.fex), .edge_in, .edge_out(edge_now),
    .local_any(fex_any_unused), .neigh_any(neigh_any_unused));

  // hold the corrected sample until its sum is ready, then pack it
  corr_sample_t corr_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      corr_q   <= '0;
      edge_out <= '0;
    end else if (corr_valid) begin
      corr_q   <= corr;
      edge_out <= edge_now;
    end
  end

  logic [WORDS_PER_SAMPLE-1:0][63:0] rec, dly;
  logic dly_valid;
  assign rec = pack_sample(corr_q, tower_sum, edge_in);

  presample_buffer #(.W(SAMPLE_W), .DEPTH_MAX(PRESAMPLE_MAX)) u_pre (
    .clk, .rst_n, .in_valid(tower_valid), .din(rec),
    .depth($clog2(PRESAMPLE_MAX)'(depth)), .out_valid(dly_valid), .dout(dly));

  logic          cb_we;
  logic [ISW-1:0] cb_waddr;
  logic [63:0]   cb_wdata;
  logic          of_push, of_full;
  result_t       of_data;
  logic [$clog2(OUT_FIFO_DEPTH+1)-1:0] of_count_unused;

  gate_controller #(.N_ACC(N_ACC), .AW(ISW)) u_gate (
    .clk, .rst_n, .is_en, .samples, .sw_trig, .sw_trig_en,
    .spy_valid(tower_valid), .spy_tr(corr_q.st.tr),
    .s_valid(dly_valid), .s_words(dly),
    .s_fex_local(|dly[6][47:24]), .s_fex_neigh(|dly[7][9:0]), .s_linkerr(dly[7][40]),
    .cb_we, .cb_waddr, .cb_wdata, .of_push, .of_data, .of_full,
    .gate, .l1a_start, .l1a_drop, .of_ovf);

  sync_fifo #(.WIDTH($bits(result_t)), .DEPTH(OUT_FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n, .clear(!is_en), .push(of_push), .din(of_data), .pop(of_pop),
    .dout(of_head), .empty(of_empty), .full(of_full), .count(of_count_unused));

  circular_buffer #(.WORDS(IS_WORDS)) u_is (
    .clk, .we(cb_we), .waddr(cb_waddr), .wdata(cb_wdata), .rreq(is_req),
    .rdata(is_rdata));

endmodule
