// presample_buffer -- delays the stream of samples by a programmable number
// of samples, so that the samples stored for an L1Accept begin before it.
//
// Every sample (in_valid) is written into a circular memory of DEPTH_MAX
// entries, and the sample written `depth` samples earlier is read out.  depth
// 0 passes the incoming sample straight through.  out_valid pulses one cycle
// after in_valid.  After start-up the first `depth` outputs are whatever the
// memory held.
//
// Interface: in_valid/din, depth (0 .. DEPTH_MAX-1), out_valid/dout.
// The capacity of 128 samples (34 us) and the programmable depth follow the
// document; the zero-depth bypass and the one-cycle output register are this
// design's choices.
module presample_buffer #(
  parameter int W         = 512,
  parameter int DEPTH_MAX = 128
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic [W-1:0]                 din,
  input  logic [$clog2(DEPTH_MAX)-1:0] depth,
  output logic                         out_valid,
  output logic [W-1:0]                 dout
);

  localparam int PW = $clog2(DEPTH_MAX);

  logic [W-1:0]  mem [DEPTH_MAX];
  logic [PW-1:0] wp;
  logic [PW-1:0] rp;

  assign rp = wp - depth;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      mem[wp] <= din;
      dout    <= (depth == '0) ? din : mem[rp];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp        <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) wp <= wp + 1'b1;
    end
  end

endmodule
