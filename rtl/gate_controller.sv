// gate_controller -- moves the samples belonging to each L1Accept from the
// presample buffer into the circular buffer and reports where they start.
//
// The controller spies on the Tr bit of every sample entering the presample
// buffer (spy_valid/spy_tr).  A software trigger (sw_trig while sw_trig_en)
// counts as a Tr on the next sample.  A trigger opens an accumulator: the
// current circular-buffer write pointer (the start offset) and a count of
// `samples` samples still to store.  The accumulators form a small FIFO (the
// IN_FIFO) of N_ACC entries, so up to N_ACC overlapping L1Accepts are tracked;
// a trigger finding all of them busy is dropped and l1a_drop pulses.
//
// While any accumulator is open the gate is closed, i.e. each sample leaving
// the presample buffer (s_valid/s_words, one cycle after the spied sample) is
// written into the circular buffer as WORDS_PER_SAMPLE consecutive 64-bit
// words, one per clock, and the write pointer advances by that many words,
// wrapping at the end of the buffer.  A new trigger while the gate is closed
// simply extends it (a retriggerable monostable): samples shared by two
// L1Accepts are written once and counted by both.  Each open accumulator ORs
// the sample's link-error, local-FEX and neighbour-FEX flags into its
// READY/FEX bits.  When the oldest accumulator has counted all its samples
// its result (start offset, FEX, neighbour FEX, READY) is pushed into the
// OUT_FIFO once the last word of that sample is in the buffer; if the OUT_FIFO
// is full the result is lost and of_ovf pulses.
//
// is_en low holds everything in its initial state (the IS is being reset).
// Trigger-to-gate behaviour, the accumulated flags and the four accumulators
// follow the document.  Dropping triggers beyond N_ACC, the word order of a
// sample and treating samples = 0 as 1 are this design's choices.
module gate_controller
  import upc_pkg::*;
#(
  parameter int N_ACC = 4,
  parameter int AW    = IS_AW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 is_en,
  input  logic [SAMPLES_W-1:0] samples,
  input  logic                 sw_trig,
  input  logic                 sw_trig_en,
  input  logic                 spy_valid,
  input  logic                 spy_tr,
  input  logic                 s_valid,
  input  logic [WORDS_PER_SAMPLE-1:0][63:0] s_words,
  input  logic                 s_fex_local,
  input  logic                 s_fex_neigh,
  input  logic                 s_linkerr,
  output logic                 cb_we,
  output logic [AW-1:0]        cb_waddr,
  output logic [63:0]          cb_wdata,
  output logic                 of_push,
  output result_t              of_data,
  input  logic                 of_full,
  output logic                 gate,
  output logic                 l1a_start,
  output logic                 l1a_drop,
  output logic                 of_ovf
);

  localparam int IW = (N_ACC > 1) ? $clog2(N_ACC) : 1;
  localparam int WW = $clog2(WORDS_PER_SAMPLE);

  // accumulators (IN_FIFO entries)
  logic [N_ACC-1:0][AW-1:0]        a_off;
  logic [N_ACC-1:0][SAMPLES_W-1:0] a_rem;
  logic [N_ACC-1:0]                a_rdy, a_fexl, a_fexn;
  logic [IW-1:0]                   head;
  logic [IW:0]                     cnt;

  logic          sw_pend, trig_pend;
  logic [AW-1:0] wp;

  // word serialiser
  logic [WORDS_PER_SAMPLE-1:0][63:0] wbuf;
  logic [AW-1:0] wbase;
  logic [WW:0]   widx;
  logic          wbusy;
  logic          done_pend;
  result_t       done_res;

  assign gate     = cnt != '0;
  assign cb_we    = wbusy;
  assign cb_waddr = wbase + AW'(widx);
  assign cb_wdata = wbuf[widx[WW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_off <= '0; a_rem <= '0; a_rdy <= '0; a_fexl <= '0; a_fexn <= '0;
      head <= '0; cnt <= '0; sw_pend <= 1'b0; trig_pend <= 1'b0; wp <= '0;
      wbuf <= '0; wbase <= '0; widx <= '0; wbusy <= 1'b0;
      done_pend <= 1'b0; done_res <= '0;
      of_push <= 1'b0; of_data <= '0; l1a_drop <= 1'b0; l1a_start <= 1'b0;
      of_ovf <= 1'b0;
    end else if (!is_en) begin
      head <= '0; cnt <= '0; sw_pend <= 1'b0; trig_pend <= 1'b0; wp <= '0;
      widx <= '0; wbusy <= 1'b0; done_pend <= 1'b0;
      of_push <= 1'b0; l1a_drop <= 1'b0; l1a_start <= 1'b0; of_ovf <= 1'b0;
    end else begin
      automatic logic [IW:0]   n_cnt  = cnt;
      automatic logic [IW-1:0] n_head = head;
      of_push   <= 1'b0;
      l1a_drop  <= 1'b0;
      l1a_start <= 1'b0;
      of_ovf    <= 1'b0;

      // software trigger waits for the next spied sample
      if (sw_trig && sw_trig_en) sw_pend <= 1'b1;
      if (spy_valid) begin
        trig_pend <= spy_tr || sw_pend || (sw_trig && sw_trig_en);
        sw_pend   <= 1'b0;
      end

      if (s_valid) begin
        trig_pend <= 1'b0;
        // open a new accumulator for this L1Accept
        if (trig_pend) begin
          if (cnt < (IW+1)'(N_ACC)) begin
            automatic logic [IW-1:0] t = IW'((int'(head) + int'(cnt)) % N_ACC);
            a_off[t]  <= wp;
            a_rem[t]  <= (samples == '0) ? SAMPLES_W'(1) : samples;
            a_rdy[t]  <= 1'b0;
            a_fexl[t] <= 1'b0;
            a_fexn[t] <= 1'b0;
            n_cnt     = cnt + 1'b1;
            l1a_start <= 1'b1;
          end else begin
            l1a_drop <= 1'b1;
          end
        end
        if (n_cnt != '0) begin
          automatic int n_open = int'(n_cnt);
          // gate closed: store this sample
          wbuf  <= s_words;
          wbase <= wp;
          widx  <= '0;
          wbusy <= 1'b1;
          wp    <= wp + AW'(WORDS_PER_SAMPLE);
          for (int k = 0; k < N_ACC; k++) begin
            automatic logic [IW-1:0] e = IW'((int'(head) + k) % N_ACC);
            if (k < n_open) begin
              automatic logic [SAMPLES_W-1:0] r =
                (k == int'(cnt)) ? ((samples == '0) ? SAMPLES_W'(1) : samples) : a_rem[e];
              automatic logic rdy  = (k == int'(cnt) ? 1'b0 : a_rdy[e])  | s_linkerr;
              automatic logic fexl = (k == int'(cnt) ? 1'b0 : a_fexl[e]) | s_fex_local;
              automatic logic fexn = (k == int'(cnt) ? 1'b0 : a_fexn[e]) | s_fex_neigh;
              a_rem[e]  <= r - 1'b1;
              a_rdy[e]  <= rdy;
              a_fexl[e] <= fexl;
              a_fexn[e] <= fexn;
              if (k == 0 && r == SAMPLES_W'(1)) begin
                // oldest L1Accept complete: result goes out after the write
                done_pend <= 1'b1;
                done_res  <= '{fex_local: fexl, fex_neigh: fexn, ready: rdy,
                               offset: (k == int'(cnt)) ? wp : a_off[e]};
                n_head = IW'((int'(head) + 1) % N_ACC);
                n_cnt  = n_cnt - 1'b1;
              end
            end
          end
        end
        head <= n_head;
        cnt  <= n_cnt;
      end

      // serialise the stored sample into the circular buffer
      if (wbusy) begin
        if (widx == (WW+1)'(WORDS_PER_SAMPLE - 1)) begin
          wbusy <= 1'b0;
          if (done_pend) begin
            done_pend <= 1'b0;
            if (of_full) of_ovf <= 1'b1;
            else begin
              of_push <= 1'b1;
              of_data <= done_res;
            end
          end
        end else begin
          widx <= widx + 1'b1;
        end
      end
    end
  end

  // a new sample must not arrive while the previous one is still being written
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n || !is_en)
                                 !(s_valid && wbusy));

endmodule
