// led_stretcher -- keeps a front-panel LED lit long enough to be seen.
//
// Any cycle with pulse high (re)loads a down-counter to STRETCH; the LED is
// on while the counter is non-zero, so a single-cycle event lights it for
// STRETCH cycles and a steady level keeps it lit.  The default, 2**21 cycles
// of the 59.5 MHz SYSCLK, is about 35 ms.
//
// The document asks for stretched LEDs; the counter and its length are this
// design's choices.
module led_stretcher #(
  parameter int STRETCH = 1 << 21
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pulse,
  output logic led
);

  logic [$clog2(STRETCH+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cnt <= '0;
    else if (pulse)      cnt <= ($clog2(STRETCH+1))'(STRETCH);
    else if (cnt != '0)  cnt <= cnt - 1'b1;
  end

  assign led = cnt != '0;

endmodule
