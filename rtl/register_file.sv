// register_file -- the card's i960 slave: control and status registers, the
// look-up-table window and the intermediate-store window.
//
// Two 16 MB windows are decoded, each selected by bits 31:24 of the address
// matching a DIP-switch value.  In the register window (reg_base):
//   0x00 SERNO      ro  {serial number[7:0], 7'b0, PC_TYPE = 1, location[15:0]}
//   0x04 CTRL       rw  ENC DINC CLKC DOUTC ENB DINB CLKB DOUTB ENA DINA CLKA
//                       DOUTA (31..20), LUTEN 19, ISEN 18, SWTRIGEN 17,
//                       SAMPLES 16:7, DEPTH 6:0; DOUTx read the offset
//                       registers; ENx, LUTEN, ISEN, SWTRIGEN reset to 0
//   0x08 LINK_STAT  ADC pins ADIN 21, ACLK 20, ACS* 19 (rw), ADOUT 18 and
//                   ASSTRB 17 (ro); per FLINK x = A, B, C at bits 4x+3..4x:
//                   RXDET, LRDY, start-up state[1:0] (ro)
//   0x0C TRIGCTRL   rw  TRIGTEST 4 (reset 0), FROFFSET 3:0
//   0x10 SWTRIG     any access triggers the gate controllers (sw_trig pulse)
//   0x200000-0x3FFFFF  LUTs when LUTEN = 1: FLINK 20:19, crystal 18:14,
//                   range 13:12, ADC 11:2; data ADD 17, FEX 16, energy 15:0
// In the IS window (is_base): FLINK 18:17, bit 16 not decoded (the store
// appears twice, back to back), 64-bit word offset 15:3, word select 2.
// The IS window is read-only.
//
// Bus: one access per cycle on bus_rd or bus_wr with a 32-bit address, byte
// enables and write data; byte enables select the bytes written.  Read data
// is returned with bus_rvalid one cycle after bus_rd, so bursts are simply
// consecutive accesses.  Unmapped reads return 0.  `activity` pulses on every
// access to either window (for the i960 LED).  lut_req and is_req carry the
// decoded address fields and the write data straight from the bus in the
// same cycle; only their strobes depend on the decode, so most of their bits
// are simply copies of bus_addr and bus_wdata bits.
//
// The map and bit assignments follow the document.  The one-cycle bus
// protocol, the treatment of LINK_STAT bits 16:12 as zero, the read-only IS
// and the LUT window ending at 0x3FFFFF (the width of its address fields)
// are this design's choices.
module register_file
  import upc_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  // DIP switches and board identity
  input  logic [7:0]               reg_base,
  input  logic [7:0]               is_base,
  input  logic [7:0]               serno,
  input  logic [15:0]              location,
  // i960 bus
  input  logic [31:0]              bus_addr,
  input  logic                     bus_rd,
  input  logic                     bus_wr,
  input  logic [3:0]               bus_be,
  input  logic [31:0]              bus_wdata,
  output logic [31:0]              bus_rdata,
  output logic                     bus_rvalid,
  output logic                     activity,
  // CTRL
  output logic [N_FLINK-1:0]       en,
  output logic [N_FLINK-1:0]       off_din,
  output logic [N_FLINK-1:0]       off_sclk,
  input  logic [N_FLINK-1:0]       off_dout,
  output logic                     lut_en,
  output logic                     is_en,
  output logic                     sw_trig_en,
  output logic [SAMPLES_W-1:0]     samples,
  output logic [DEPTH_W-1:0]       depth,
  // LINK_STAT
  output logic                     adc_din,
  output logic                     adc_clk,
  output logic                     adc_cs_n,
  input  logic                     adc_dout,
  input  logic                     adc_sstrb,
  input  logic [N_FLINK-1:0]       rxdet,
  input  logic [N_FLINK-1:0]       lrdy,
  input  logic [N_FLINK-1:0][1:0]  lst,
  // TRIGCTRL / SWTRIG
  output logic                     trig_test,
  output logic [3:0]               frame_offset,
  output logic                     sw_trig,
  // LUT and IS windows
  output lut_req_t [N_FLINK-1:0]   lut_req,
  input  lut_entry_t [N_FLINK-1:0] lut_rdata,
  output is_req_t [N_FLINK-1:0]    is_req,
  input  logic [N_FLINK-1:0][31:0] is_rdata
);

  typedef enum logic [1:0] { R_REG, R_LUT, R_IS } rsrc_t;

  logic        in_reg, in_is, in_lut;
  logic [23:0] off;
  logic [1:0]  lut_f, is_f;
  logic [31:0] wmask;

  assign in_reg = bus_addr[31:24] == reg_base;
  assign in_is  = !in_reg && bus_addr[31:24] == is_base;
  assign off    = bus_addr[23:0];
  assign in_lut = in_reg && off[23:21] == 3'b001;
  assign lut_f  = off[20:19];
  assign is_f   = bus_addr[18:17];
  assign wmask  = {{8{bus_be[3]}}, {8{bus_be[2]}}, {8{bus_be[1]}}, {8{bus_be[0]}}};

  // registers with a reset value
  logic [N_FLINK-1:0] en_q;
  logic lut_en_q, is_en_q, sw_trig_en_q, trig_test_q;
  // registers the document leaves unaffected by reset
  logic [N_FLINK-1:0] din_q, sclk_q;
  logic [SAMPLES_W-1:0] samples_q;
  logic [DEPTH_W-1:0]   depth_q;
  logic [2:0]  adc_q;          // ADIN, ACLK, ACS*
  logic [3:0]  frofs_q;

  logic [31:0] ctrl_rd, link_rd, trig_rd, serno_rd;
  always_comb begin
    ctrl_rd = {en_q[2], din_q[2], sclk_q[2], off_dout[2],
               en_q[1], din_q[1], sclk_q[1], off_dout[1],
               en_q[0], din_q[0], sclk_q[0], off_dout[0],
               lut_en_q, is_en_q, sw_trig_en_q, samples_q, depth_q};
    link_rd = {10'd0, adc_q, adc_dout, adc_sstrb, 5'd0,
               rxdet[2], lrdy[2], lst[2], rxdet[1], lrdy[1], lst[1],
               rxdet[0], lrdy[0], lst[0]};
    trig_rd  = {27'd0, trig_test_q, frofs_q};
    serno_rd = {serno, 7'd0, 1'b1, location};
  end

  logic wr_ctrl, wr_link, wr_trig;
  assign wr_ctrl = bus_wr && in_reg && off == REG_CTRL;
  assign wr_link = bus_wr && in_reg && off == REG_LINK_STAT;
  assign wr_trig = bus_wr && in_reg && off == REG_TRIGCTRL;

  logic [31:0] ctrl_new, link_new, trig_new;
  assign ctrl_new = (ctrl_rd & ~wmask) | (bus_wdata & wmask);
  assign link_new = (link_rd & ~wmask) | (bus_wdata & wmask);
  assign trig_new = (trig_rd & ~wmask) | (bus_wdata & wmask);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q <= '0; lut_en_q <= 1'b0; is_en_q <= 1'b0; sw_trig_en_q <= 1'b0;
      trig_test_q <= 1'b0;
    end else begin
      if (wr_ctrl) begin
        en_q         <= {ctrl_new[31], ctrl_new[27], ctrl_new[23]};
        lut_en_q     <= ctrl_new[19];
        is_en_q      <= ctrl_new[18];
        sw_trig_en_q <= ctrl_new[17];
      end
      if (wr_trig) trig_test_q <= trig_new[4];
    end
  end

  always_ff @(posedge clk) begin
    if (wr_ctrl) begin
      din_q     <= {ctrl_new[30], ctrl_new[26], ctrl_new[22]};
      sclk_q    <= {ctrl_new[29], ctrl_new[25], ctrl_new[21]};
      samples_q <= ctrl_new[16:7];
      depth_q   <= ctrl_new[6:0];
    end
    if (wr_link) adc_q   <= link_new[21:19];
    if (wr_trig) frofs_q <= trig_new[3:0];
  end

  assign en = en_q;  assign lut_en = lut_en_q;  assign is_en = is_en_q;
  assign sw_trig_en = sw_trig_en_q;  assign trig_test = trig_test_q;
  assign off_din = din_q;  assign off_sclk = sclk_q;
  assign samples = samples_q;  assign depth = depth_q;
  assign frame_offset = frofs_q;
  assign {adc_din, adc_clk, adc_cs_n} = adc_q;

  // LUT and IS requests
  always_comb begin
    for (int f = 0; f < N_FLINK; f++) begin
      lut_req[f].rd       = bus_rd && in_lut && lut_en_q && lut_f == 2'(f);
      lut_req[f].wr       = bus_wr && in_lut && lut_en_q && lut_f == 2'(f);
      lut_req[f].crystal  = off[18:14];
      lut_req[f].dig      = off[13:2];
      lut_req[f].be       = bus_be[2:0];
      lut_req[f].wdata    = bus_wdata[17:0];
      is_req[f].rd        = bus_rd && in_is && is_f == 2'(f);
      is_req[f].offset    = bus_addr[15:3];
      is_req[f].hi        = bus_addr[2];
    end
  end

  // read response
  rsrc_t       src_q;
  logic [1:0]  f_q;
  logic [31:0] reg_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_rvalid <= 1'b0; src_q <= R_REG; f_q <= '0; reg_q <= '0;
      sw_trig <= 1'b0; activity <= 1'b0;
    end else begin
      bus_rvalid <= bus_rd;
      sw_trig    <= (bus_rd || bus_wr) && in_reg && off == REG_SWTRIG;
      activity   <= (bus_rd || bus_wr) && (in_reg || in_is);
      if (bus_rd) begin
        f_q   <= in_lut ? lut_f : is_f;
        src_q <= in_is ? R_IS : (in_lut && lut_en_q) ? R_LUT : R_REG;
        unique case (1'b1)
          in_reg && off == REG_SERNO:     reg_q <= serno_rd;
          in_reg && off == REG_CTRL:      reg_q <= ctrl_rd;
          in_reg && off == REG_LINK_STAT: reg_q <= link_rd;
          in_reg && off == REG_TRIGCTRL:  reg_q <= trig_rd;
          default:                        reg_q <= '0;
        endcase
      end
    end
  end

  always_comb begin
    bus_rdata = '0;
    if (bus_rvalid) begin
      unique case (src_q)
        R_LUT:   bus_rdata = (f_q < 2'(N_FLINK)) ? {14'd0, lut_rdata[f_q]} : '0;
        R_IS:    bus_rdata = (f_q < 2'(N_FLINK)) ? is_rdata[f_q] : '0;
        default: bus_rdata = reg_q;
      endcase
    end
  end

endmodule
