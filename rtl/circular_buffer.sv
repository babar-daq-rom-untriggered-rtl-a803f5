// circular_buffer -- the intermediate store (IS) of one FLINK.
//
// A WORDS x 64-bit memory written by the gate controller, one word per cycle,
// at addresses that wrap from the end back to the start.  The i960 reads it
// as 32-bit words: the request carries the 64-bit word offset and a word
// select (1 = bits 63:32).  The address bit above the offset is not decoded
// (by the register decoder), so the buffer appears twice in consecutive
// regions of the i960 address space: a block that wraps in the buffer can be
// read with linearly increasing addresses.  Read data is valid the cycle
// after the request.
//
// The 8k x 64 size, the 32-bit view with word select and the double mapping
// follow the document; the one-cycle read latency is this design's choice.
module circular_buffer
  import upc_pkg::*;
#(
  parameter int WORDS = 1 << IS_AW
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [63:0]              wdata,
  input  is_req_t                  rreq,
  output logic [31:0]              rdata
);

  localparam int AW = $clog2(WORDS);

  logic [63:0] mem [WORDS];
  logic [63:0] q;
  logic        hi_q;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (rreq.rd) begin
      q    <= mem[rreq.offset[AW-1:0]];
      hi_q <= rreq.hi;
    end
  end

  assign rdata = hi_q ? q[63:32] : q[31:0];

endmodule
