// offset_sreg -- serially loaded register holding the LUT offset of one FLINK.
//
// The corrected energies are offset binary; the trigger summer subtracts this
// offset before adding a crystal into the tower sum.  Software loads the
// offset LSB first through three control-register bits, exactly like a shift
// register: it sets the data-in bit, then raises the clock bit; every rising
// edge of sclk shifts din in at the top, and the bit at the other end (bit 0)
// is visible on dout, so the old contents can be read back while a new value
// is shifted in.  After WIDTH clocks the first bit written sits in bit 0.
//
// sclk and din come from register bits in the clk domain; the rising edge of
// sclk is detected against its value in the previous cycle.  The register is
// not reset (the document lists the offset bits as unaffected by reset).
// Detecting the edge synchronously is this design's choice.
module offset_sreg #(
  parameter int WIDTH = 16
) (
  input  logic             clk,
  input  logic             din,
  input  logic             sclk,
  output logic             dout,
  output logic [WIDTH-1:0] value
);

  logic sclk_q;

  always_ff @(posedge clk) begin
    sclk_q <= sclk;
    if (sclk && !sclk_q) value <= {din, value[WIDTH-1:1]};
  end

  assign dout = value[0];

endmodule
