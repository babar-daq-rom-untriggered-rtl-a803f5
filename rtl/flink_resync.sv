// flink_resync -- moves one FLINK from its recovered link clock onto SYSCLK.
//
// Each G-LINK receiver delivers its 20-bit words on a clock recovered from the
// fibre.  Its frequency is the system clock's, since the front ends are
// locked to SYSCLK, but its phase is arbitrary and differs between FLINKs.
// Everything after this block runs on SYSCLK.  Words enter a small
// asynchronous FIFO on wclk together with their control-word flag and link
// status {ctrl, err, lrdy, word}.  A gray-coded pointer crosses each way
// through two flip-flops.  On the SYSCLK side one word is presented per clock
// while the FIFO is not empty: out_valid with the word, one clock after it
// becomes visible.  Link ready and error are also brought over continuously
// through two-flop synchronisers, for the status register, the CC status
// pins and the LEDs.
//
// Interface: wclk side in_valid/in_ctrl/in_word/in_lrdy/in_err; clk side
// out_valid/out_ctrl/out_word/out_lrdy/out_err (per word) and lrdy_s/err_s
// (level); overflow pulses on wclk if a word arrives with the FIFO full and
// the word is lost.  Latency is about four clocks.  rst_n resets both sides
// asynchronously.
//
// The document says the FLINK logic runs on the recovered clock and that the
// data are re-synchronised to SYSCLK, without saying where; crossing at the
// input with a FIFO of DEPTH words is this design's choice.
module flink_resync
  import upc_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic              wclk,
  input  logic              clk,
  input  logic              rst_n,
  // recovered-clock side
  input  logic              in_valid,
  input  logic              in_ctrl,
  input  logic [WORD_W-1:0] in_word,
  input  logic              in_lrdy,
  input  logic              in_err,
  output logic              overflow,
  // SYSCLK side
  output logic              out_valid,
  output logic              out_ctrl,
  output logic [WORD_W-1:0] out_word,
  output logic              out_lrdy,
  output logic              out_err,
  output logic              lrdy_s,
  output logic              err_s
);

  localparam int AW = $clog2(DEPTH);
  localparam int DW = WORD_W + 3;

  logic [DW-1:0] mem [DEPTH];

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  logic [AW:0] wbin, wgray, rgray_w1, rgray_w2;   // write side
  logic [AW:0] rbin, rgray_r, wgray_r1, wgray_r2;  // read side

  // write side (wclk)
  logic        full;
  assign full = bin2gray(wbin) == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]};

  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0; overflow <= 1'b0;
    end else begin
      rgray_w1 <= rgray_r;
      rgray_w2 <= rgray_w1;
      overflow <= in_valid && full;
      if (in_valid && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wclk)
    if (in_valid && !full) mem[wbin[AW-1:0]] <= {in_ctrl, in_err, in_lrdy, in_word};

  // read side (clk)
  logic        empty;
  assign empty = rgray_r == wgray_r2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rbin <= '0; rgray_r <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
      out_valid <= 1'b0; out_ctrl <= 1'b0; out_word <= '0; out_lrdy <= 1'b0; out_err <= 1'b0;
    end else begin
      wgray_r1  <= wgray;
      wgray_r2  <= wgray_r1;
      out_valid <= !empty;
      if (!empty) begin
        {out_ctrl, out_err, out_lrdy, out_word} <= mem[rbin[AW-1:0]];
        rbin    <= rbin + 1'b1;
        rgray_r <= bin2gray(rbin + 1'b1);
      end
    end
  end

  // level status
  logic [1:0] lrdy_q, err_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lrdy_q <= '0; err_q <= '0;
    end else begin
      lrdy_q <= {lrdy_q[0], in_lrdy};
      err_q  <= {err_q[0], in_err};
    end
  end
  assign lrdy_s = lrdy_q[1];
  assign err_s  = err_q[1];

endmodule
