// flink_deformatter -- cracks the FLINK packet format into one raw sample.
//
// A packet is sixteen 20-bit words; the first is a G-LINK control word, the
// other fifteen are data words.  The control word marks the packet start, so
// the deformatter synchronises on it automatically after link start-up.
// Bits 17:0 of every word hold six columns of three crystal bits: column k
// (bits 3k+2:3k) of word w belongs to crystal 4k + w/4, and supplies bits
// 3(w%4)+2 : 3(w%4) of that crystal's {R1,R0,A9..A0}.  Bits 19:18 of data
// words 1..15 carry the front-end status: bit 19 holds W0..W9, T0..T3, Tr and
// bit 18 holds H0..H9 (or F/S), C0..C3, Cs, in word order.
//
// Interface: one word per clock when in_valid; in_ctrl flags a control word.
// Link status (lrdy, err) is sampled with every word and ORed into the
// sample's linkerr flag.  out_valid pulses for one cycle in the clock after the
// sixteenth word, with the whole packet on out.  A control word arriving before
// a packet is complete restarts the packet and pulses sync_err; data words seen
// before the first control word are ignored.
//
// The packet geometry follows the document.  Resynchronising on a premature
// control word, and treating "not ready" as well as "error" as the per-sample
// link-status flag, are this design's choices.
module flink_deformatter
  import upc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_ctrl,
  input  logic [WORD_W-1:0] in_word,
  input  logic              lrdy,
  input  logic              err,
  output logic              out_valid,
  output raw_sample_t       out,
  output logic              sync_err
);

  logic              synced;
  logic [3:0]        widx;      // index of the next expected data word
  raw_sample_t       acc;

  // Places one word into an assembled packet.
  function automatic raw_sample_t place(input raw_sample_t s, input logic [3:0] w,
                                        input logic [WORD_W-1:0] d);
    raw_sample_t r = s;
    for (int k = 0; k < 6; k++)
      r.dig[4*k + int'(w[3:2])][3*w[1:0] +: 3] = d[3*k +: 3];
    if (w >= 4'd1 && w <= 4'd10) begin
      r.st.wall[w-1] = d[19];
      r.st.hdr[w-1]  = d[18];
    end else if (w >= 4'd11 && w <= 4'd14) begin
      r.st.tphase[w-11] = d[19];
      r.st.cphase[w-11] = d[18];
    end else if (w == 4'd15) begin
      r.st.tr = d[19];
      r.st.cs = d[18];
    end
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      synced    <= 1'b0;
      widx      <= '0;
      acc       <= '0;
      out       <= '0;
      out_valid <= 1'b0;
      sync_err  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      sync_err  <= 1'b0;
      if (in_valid) begin
        if (in_ctrl) begin
          // packet start; a control word in mid-packet drops the partial one
          sync_err    <= synced && widx != 4'd0;
          synced      <= 1'b1;
          widx        <= 4'd1;
          acc         <= place('0, 4'd0, in_word);
          acc.linkerr <= err || !lrdy;
        end else if (synced && widx != 4'd0) begin
          acc         <= place(acc, widx, in_word);
          acc.linkerr <= acc.linkerr || err || !lrdy;
          if (widx == 4'd15) begin
            out           <= place(acc, widx, in_word);
            out.linkerr   <= acc.linkerr || err || !lrdy;
            out_valid     <= 1'b1;
            widx          <= 4'd0;   // wait for the next control word
          end else begin
            widx <= widx + 4'd1;
          end
        end
      end
    end
  end

endmodule
