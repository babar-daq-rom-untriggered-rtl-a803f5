// upc_tb_pkg -- reference models shared by the channel and card testbenches.
//
// encode_packet builds the sixteen FLINK words of a packet from crystal codes
// and status, following the packet map.  lut_model gives the table contents
// the testbenches load: a deterministic hash of (crystal, code) turned into
// an offset-binary energy around REF_OFFSET, with ADD above +100 and FEX
// above +40 counts (FEX threshold below ADD, as intended for the real
// tables); codes in the x256 range give large energies so that tower sums can
// overflow.  sum_model, edge_model and record_model are the tower sum, edge
// FEX and stored-record references.
package upc_tb_pkg;
  import upc_pkg::*;

  localparam logic [15:0] REF_OFFSET = 16'h2000;

  function automatic logic [N_WORDS-1:0][WORD_W-1:0] encode_packet(input raw_sample_t s);
    logic [N_WORDS-1:0][WORD_W-1:0] w = '0;
    for (int n = 0; n < N_CRYSTAL; n++)
      for (int q = 0; q < 4; q++)
        for (int b = 0; b < 3; b++)
          w[4*(n%4) + q][3*(n/4) + b] = s.dig[n][3*q + b];
    for (int i = 0; i < 10; i++) begin w[1+i][19] = s.st.wall[i]; w[1+i][18] = s.st.hdr[i]; end
    for (int i = 0; i < 4; i++)  begin w[11+i][19] = s.st.tphase[i]; w[11+i][18] = s.st.cphase[i]; end
    w[15][19] = s.st.tr; w[15][18] = s.st.cs;
    return w;
  endfunction

  function automatic lut_entry_t lut_model(input int flink, input int c, input logic [11:0] code);
    int unsigned h = (32'(flink) * 32'h85EBCA6B) ^ (32'(c) * 32'h9E3779B9) ^ (32'(code) * 32'hC2B2AE35);
    int delta;
    lut_entry_t e;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    if (code[11:10] == RANGE_X256) delta = 12000 + int'(h % 20000);
    else                           delta = int'(h % 600) - 200;
    e.energy = 16'(int'(REF_OFFSET) + delta);
    e.add    = delta > 100;
    e.fex    = delta > 40;
    return e;
  endfunction

  function automatic logic [15:0] sum_model(input corr_sample_t s, input logic [15:0] offset);
    longint acc = 0;
    for (int i = 0; i < N_CRYSTAL; i++)
      if (s.add[i]) begin
        acc += longint'(s.energy[i]) - longint'(offset);
        if (acc > 65535) return 16'hFFFF;
      end
    return (acc < 0) ? 16'h0 : 16'(acc);
  endfunction

  // barrel 8 x 3: crystal n at column n/3 (0 = west), row n%3 (0 = north)
  function automatic logic [N_EDGE-1:0] edge_model(input logic [N_CRYSTAL-1:0] fex);
    logic [N_EDGE-1:0] e = '0;
    for (int n = 0; n < N_CRYSTAL; n++) if (fex[n]) begin
      int c = n / 3, r = n % 3;
      if (r == 0) begin if (c <= 4) e[0] = 1; if (c >= 3) e[1] = 1; end
      if (r == 2) begin if (c <= 4) e[5] = 1; if (c >= 3) e[6] = 1; end
      if (c == 7) e[3] = 1;
      if (c == 0) e[8] = 1;
      if (c == 7 && r == 0) e[2] = 1;
      if (c == 7 && r == 2) e[4] = 1;
      if (c == 0 && r == 2) e[7] = 1;
      if (c == 0 && r == 0) e[9] = 1;
    end
    return e;
  endfunction

  function automatic corr_sample_t correct_model(input int flink, input raw_sample_t s);
    corr_sample_t c;
    for (int n = 0; n < N_CRYSTAL; n++) begin
      lut_entry_t e = lut_model(flink, n, s.dig[n]);
      c.energy[n] = e.energy; c.add[n] = e.add; c.fex[n] = e.fex;
    end
    c.st = s.st;
    c.linkerr = s.linkerr;
    return c;
  endfunction

  // the eight stored 64-bit words of a sample, field by field
  function automatic logic [7:0][63:0] record_model(input corr_sample_t c, input logic [15:0] sum,
                                                    input logic [N_EDGE-1:0] nfex);
    logic [7:0][63:0] w = '0;
    for (int n = 0; n < N_CRYSTAL; n++) w[n / 4][16*(n % 4) +: 16] = c.energy[n];
    w[6][23:0]  = c.add;
    w[6][47:24] = c.fex;
    w[6][63:48] = sum;
    w[7][9:0]   = nfex;
    w[7][19:10] = c.st.wall;
    w[7][29:20] = c.st.hdr;
    w[7][33:30] = c.st.tphase;
    w[7][34]    = c.st.tr;
    w[7][38:35] = c.st.cphase;
    w[7][39]    = c.st.cs;
    w[7][40]    = c.linkerr;
    return w;
  endfunction
endpackage
