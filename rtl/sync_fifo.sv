// sync_fifo -- single-clock first-in first-out buffer (the OUT_FIFO).
//
// Holds up to DEPTH entries of WIDTH bits.  dout shows the oldest entry
// whenever empty is 0 (first-word fall-through); pop removes it.  A push when
// full and a pop when empty are ignored (and flagged by assertions).  clear
// empties the FIFO synchronously.
//
// The document gives the FIFO's role, not its insides; this is the plain
// circular-array implementation.
module sync_fifo #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int PW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    rp, wp;

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign empty   = count == '0;
  assign full    = count == ($clog2(DEPTH+1))'(DEPTH);
  assign dout    = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp    <= '0;
      wp    <= '0;
      count <= '0;
    end else if (clear) begin
      rp    <= '0;
      wp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= (wp == PW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == PW'(DEPTH-1)) ? '0 : rp + 1'b1;
      if (do_push && !do_pop)      count <= count + 1'b1;
      else if (do_pop && !do_push) count <= count - 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n || clear) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n || clear) !(pop && empty));

endmodule
