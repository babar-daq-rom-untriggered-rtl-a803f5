// trigger_summer -- forms the trigger tower energy sum of one FLINK.
//
// For every sample the energies of all crystals whose ADD flag is set are
// added, each after removing the LUT offset (energy - offset may be
// negative).  The ADD flag lets the tables drop noisy, dead or absent
// crystals.  If any partial sum of the accumulation exceeds the 16-bit full
// scale the result saturates at 16'hFFFF.
//
// Interface: in_valid with energy/add/offset; sum and out_valid follow one
// cycle later and sum holds until the next sample.
//
// Crystals are accumulated in crystal-number order, 0 first, as the document
// describes, with the saturation sticky once a partial sum overflows.  A final
// sum below zero, which the document does not discuss, is clamped to 0.
module trigger_summer
  import upc_pkg::*;
#(
  parameter int N = N_CRYSTAL
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic [N-1:0][ENERGY_W-1:0]  energy,
  input  logic [N-1:0]                add,
  input  logic [ENERGY_W-1:0]         offset,
  output logic                        out_valid,
  output logic [ENERGY_W-1:0]         sum
);

  localparam int AW = ENERGY_W + $clog2(N) + 2;   // signed accumulator width

  logic signed [AW-1:0] acc;
  logic                 ovf;
  logic [ENERGY_W-1:0]  result;

  always_comb begin
    acc = '0;
    ovf = 1'b0;
    for (int i = 0; i < N; i++) begin
      if (add[i] && !ovf) begin
        acc = acc + $signed({{(AW-ENERGY_W){1'b0}}, energy[i]})
                  - $signed({{(AW-ENERGY_W){1'b0}}, offset});
        if (acc > $signed(AW'(16'hFFFF))) ovf = 1'b1;
      end
    end
    if (ovf)                   result = '1;
    else if (acc < 0)          result = '0;
    else                       result = acc[ENERGY_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) sum <= result;
    end
  end

endmodule
