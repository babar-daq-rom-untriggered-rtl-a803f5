// cc_interface -- the card's side of the handshake with the controller card
// (CC), the mapping of FLINK link status onto the CC's link-status inputs, and
// the decoding of the CLINK commands the card obeys.
//
// RX_DATA: the interface waits until the OUT_FIFO of every enabled FLINK
// holds a result, or until a timeout of TIMEOUT_BASE + CYC_PER_SAMPLE *
// samples clocks (10 us plus the length of one L1Accept's data at 59.5 MHz),
// then pulses done with the status byte: bit f is 1 if enabled FLINK f timed
// out.  The CC then strobes pc_rd_n low three times; each strobe puts the
// result word of FLINK A, B, C in turn on `result` in the next clock (the
// OUT_FIFO head, which is popped, or 0 for a FLINK that is disabled or timed
// out), and pc_end is pulsed together with FLINK C's word.
// RX_READ: front-end register reads do not exist on this card, so it answers
// at once with done and pc_end and no data (rx_read_err flags the misuse).
//
// Link status: the CLINK-ready inputs of the CC are tied active (0); FLINK A
// and B ready/error drive the D-link inputs and FLINK C ready/error the
// CLINK-lock inputs.  A FLINK that is not enabled presents "not ready"
// (1 on an active-low ready input) and "no error" (0).
//
// CLINK: a command strobe with opcode 2 (Sync) pulses sync, opcode 6 (Spy
// Start) pulses spy_start; other commands are ignored.
//
// All inputs are single-cycle strobes in the clk domain; outputs are
// registered.  The document gives the sequence, the status and result
// formats, the timeout rule and the pin mapping; strobe timing and the
// polarity chosen for a disabled FLINK's error input are this design's.
module cc_interface
  import upc_pkg::*;
#(
  parameter int TIMEOUT_BASE   = 595,   // 10 us at 59.5 MHz
  parameter int CYC_PER_SAMPLE = 16     // one sample period, 0.27 us
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N_FLINK-1:0]    en,
  input  logic [SAMPLES_W-1:0]  samples,
  // CC handshake
  input  logic                  rx_data,
  input  logic                  rx_read,
  input  logic                  pc_rd_n,
  output logic                  done,
  output logic                  pc_end,
  output logic [7:0]            status,
  output logic [15:0]           result,
  output logic                  rx_read_err,
  // OUT_FIFOs
  input  logic [N_FLINK-1:0]    of_empty,
  input  result_t [N_FLINK-1:0] of_head,
  output logic [N_FLINK-1:0]    of_pop,
  // CLINK commands
  input  logic                  clink_valid,
  input  logic [CLINK_OP_W-1:0] clink_op,
  output logic                  sync,
  output logic                  spy_start,
  // link status to the CC
  input  logic [N_FLINK-1:0]    fl_lrdy,
  input  logic [N_FLINK-1:0]    fl_err,
  output logic                  n_clrdya, n_clrdyb,
  output logic                  n_dlrdya, n_dlrdyb,
  output logic                  dlerra, dlerrb,
  output logic                  n_cllcka, n_cllckb
);

  typedef enum logic [1:0] { S_IDLE, S_WAIT, S_READ } state_t;

  state_t              state;
  logic [19:0]         timer;
  logic [N_FLINK-1:0]  tmo;
  logic [1:0]          ridx;
  logic                pc_rd_q;

  logic [19:0] limit;
  assign limit = 20'(TIMEOUT_BASE) + 20'(CYC_PER_SAMPLE) * 20'(samples);

  logic [N_FLINK-1:0] have;
  assign have = ~of_empty | ~en;          // every enabled FLINK has a result

  logic rd_strobe;
  assign rd_strobe = !pc_rd_n && pc_rd_q;  // falling edge of PC_RD#

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; timer <= '0; tmo <= '0; ridx <= '0; pc_rd_q <= 1'b1;
      done <= 1'b0; pc_end <= 1'b0; status <= '0; result <= '0;
      of_pop <= '0; rx_read_err <= 1'b0;
    end else begin
      pc_rd_q     <= pc_rd_n;
      done        <= 1'b0;
      pc_end      <= 1'b0;
      of_pop      <= '0;
      rx_read_err <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (rx_read) begin
            done        <= 1'b1;
            pc_end      <= 1'b1;
            rx_read_err <= 1'b1;
          end else if (rx_data) begin
            timer <= '0;
            state <= S_WAIT;
          end
        end
        S_WAIT: begin
          if (&have || timer >= limit) begin
            tmo    <= ~have;
            status <= {5'd0, ~have};
            done   <= 1'b1;
            ridx   <= '0;
            state  <= S_READ;
          end else begin
            timer <= timer + 1'b1;
          end
        end
        S_READ: begin
          if (rd_strobe) begin
            if (en[ridx] && !tmo[ridx]) begin
              result       <= of_head[ridx];
              of_pop[ridx] <= 1'b1;
            end else begin
              result <= '0;
            end
            if (ridx == 2'(N_FLINK - 1)) begin
              pc_end <= 1'b1;
              state  <= S_IDLE;
            end
            ridx <= ridx + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // CLINK command decode
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= 1'b0;
      spy_start <= 1'b0;
    end else begin
      sync      <= clink_valid && clink_op == OP_SYNC;
      spy_start <= clink_valid && clink_op == OP_SPY_START;
    end
  end

  // link status mapping
  logic [N_FLINK-1:0] rdy_g, err_g;
  assign rdy_g    = fl_lrdy & en;
  assign err_g    = fl_err & en;
  assign n_clrdya = 1'b0;
  assign n_clrdyb = 1'b0;
  assign n_dlrdya = ~rdy_g[0];
  assign n_dlrdyb = ~rdy_g[1];
  assign dlerra   = err_g[0];
  assign dlerrb   = err_g[1];
  assign n_cllcka = ~rdy_g[2];
  assign n_cllckb = err_g[2];

  // the CC reads results only after done
  a_rd_after_done: assert property (@(posedge clk) disable iff (!rst_n)
                                    rd_strobe |-> state != S_WAIT);

endmodule
