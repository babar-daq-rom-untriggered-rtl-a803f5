// upc_pkg -- types and constants shared by the untriggered personality card.
//
// The card receives one FLINK packet per sample period (16 words of 20 bits)
// on each of three FLINKs, corrects the 24 crystal digitisations through
// look-up tables, forms a trigger tower sum, and stores selected samples in an
// intermediate store (IS) read by the i960.  This package holds the packet and
// sample record types, the i960-side request bundles, the CLINK opcodes and
// the register offsets.
//
// Follows the document: packet geometry (16 x 20-bit words, 24 crystals of
// 2 range + 10 ADC bits), the LUT data word (ADD bit 17, FEX bit 16, energy
// 15:0), the CC result word (FEX 15, neighbour FEX 14, ready/error 13,
// offset 12:0), CLINK opcodes Sync = 2 and Spy Start = 6, and the register
// offsets.  Own choices: the layout of a sample inside its eight 64-bit IS
// words (see pack_sample) and the CLINK opcode width.
package upc_pkg;

  localparam int N_FLINK    = 3;    // FLINKs A, B, C
  localparam int N_CRYSTAL  = 24;   // crystals per FLINK (one trigger tower)
  localparam int WORD_W     = 20;   // FLINK word width
  localparam int N_WORDS    = 16;   // words per packet (1 control + 15 data)
  localparam int DIG_W      = 12;   // range(2) + ADC(10)
  localparam int ENERGY_W   = 16;   // corrected energy, offset binary
  localparam int N_EDGE     = 10;   // edge FEX bits exchanged with neighbours
  localparam int IS_AW      = 13;   // 8k 64-bit words per FLINK
  localparam int WORDS_PER_SAMPLE = 8;  // 64-bit IS words per stored sample
  localparam int SAMPLE_W   = 64 * WORDS_PER_SAMPLE;
  localparam int SAMPLES_W  = 10;   // CTRL.SAMPLES field width
  localparam int DEPTH_W    = 7;    // CTRL.DEPTH field width
  localparam int CLINK_OP_W = 4;

  // Gain range codes (R1 R0)
  localparam logic [1:0] RANGE_X1   = 2'd0;
  localparam logic [1:0] RANGE_X4   = 2'd1;
  localparam logic [1:0] RANGE_X32  = 2'd2;
  localparam logic [1:0] RANGE_X256 = 2'd3;

  // CLINK commands the card responds to
  localparam logic [CLINK_OP_W-1:0] OP_SYNC      = 4'd2;
  localparam logic [CLINK_OP_W-1:0] OP_SPY_START = 4'd6;

  // Register offsets (bits 23:0 of the address, below the DIP-switch base)
  localparam logic [23:0] REG_SERNO     = 24'h000000;
  localparam logic [23:0] REG_CTRL      = 24'h000004;
  localparam logic [23:0] REG_LINK_STAT = 24'h000008;
  localparam logic [23:0] REG_TRIGCTRL  = 24'h00000C;
  localparam logic [23:0] REG_SWTRIG    = 24'h000010;

  // Front-end status carried in the two status bits of data words 1..15
  typedef struct packed {
    logic [9:0] wall;    // W9..W0 wall clock
    logic [9:0] hdr;     // H9..H0 CLINK header, or S7..S0,F1..F0
    logic [3:0] tphase;  // T3..T0 phase of last L1Accept
    logic       tr;      // L1Accept seen in this sample period
    logic [3:0] cphase;  // C3..C0 phase of last Cal strobe
    logic       cs;      // Cal strobe seen in this sample period
  } fe_status_t;

  // One deformatted packet
  typedef struct packed {
    logic [N_CRYSTAL-1:0][DIG_W-1:0] dig;   // {R1,R0,A9..A0} per crystal
    fe_status_t                      st;
    logic                            linkerr; // link not ready or error during packet
  } raw_sample_t;

  // LUT data word (bits 17:0 of the i960 LUT word)
  typedef struct packed {
    logic                add;
    logic                fex;
    logic [ENERGY_W-1:0] energy;
  } lut_entry_t;

  // One corrected sample
  typedef struct packed {
    logic [N_CRYSTAL-1:0][ENERGY_W-1:0] energy;
    logic [N_CRYSTAL-1:0]               add;
    logic [N_CRYSTAL-1:0]               fex;
    fe_status_t                         st;
    logic                               linkerr;
  } corr_sample_t;

  // Result word returned to the CC for one FLINK
  typedef struct packed {
    logic             fex_local;
    logic             fex_neigh;
    logic             ready;     // LRDY/ERROR seen in any stored sample
    logic [IS_AW-1:0] offset;    // IS word offset of the first sample
  } result_t;

  // i960 access to one FLINK's look-up tables
  typedef struct packed {
    logic             rd;
    logic             wr;
    logic [4:0]       crystal;
    logic [DIG_W-1:0] dig;
    logic [2:0]       be;        // byte lanes: energy[7:0], energy[15:8], flags
    lut_entry_t       wdata;
  } lut_req_t;

  // i960 read of one FLINK's intermediate store (32-bit view)
  typedef struct packed {
    logic             rd;
    logic [IS_AW-1:0] offset;
    logic             hi;        // word select: 1 = bits 63:32
  } is_req_t;

  // Sample record as stored in the IS: eight 64-bit words.
  //   words 0..5 : energy of crystal 4w+i in bits 16i+15:16i
  //   word 6     : ADD[23:0] in 23:0, FEX[23:0] in 47:24, tower sum in 63:48
  //   word 7     : neighbour FEX in 9:0, W 19:10, H 29:20, T 33:30, Tr 34,
  //                C 38:35, Cs 39, link error 40, zero above
  function automatic logic [WORDS_PER_SAMPLE-1:0][63:0] pack_sample(
      input corr_sample_t s, input logic [ENERGY_W-1:0] sum,
      input logic [N_EDGE-1:0] nfex);
    logic [WORDS_PER_SAMPLE-1:0][63:0] w;
    for (int i = 0; i < 6; i++)
      w[i] = {s.energy[4*i+3], s.energy[4*i+2], s.energy[4*i+1], s.energy[4*i]};
    w[6] = {sum, s.fex, s.add};
    w[7] = {23'd0, s.linkerr, s.st.cs, s.st.cphase, s.st.tr, s.st.tphase,
            s.st.hdr, s.st.wall, nfex};
    return w;
  endfunction

endpackage
