// lut_correction -- converts raw range/ADC digitisations to a linear energy
// scale through look-up tables, and attaches the ADD and FEX flags.
//
// Each crystal's 12-bit {range, ADC} code addresses a table entry holding a
// 16-bit offset-binary energy (true energy plus an offset, so the undershoot
// of the AC-coupled pulse can be represented without losing a bit of range)
// and two flags: ADD gates the crystal into the trigger tower sum, FEX marks it
// for feature extraction.  The tables are split over N_LUT banks; bank b holds
// the tables of crystals b*CPL .. b*CPL+CPL-1 (CPL = N_CRYSTAL/N_LUT), each
// bank being CPL*4096 entries of 18 bits.  A sample is corrected in CPL clock
// cycles: in cycle i every bank looks up its crystal i, so with the default
// three banks the 24 crystals take 8 cycles, well inside the 16-cycle sample
// period.
//
// Interface: in_valid/in carries a deformatted packet; out_valid pulses once,
// CPL+1 cycles later, with the corrected sample (status passed through).
// When lut_en is 1 the tables belong to the i960: lut_req reads or writes one
// entry (crystal 0..23, code 0..4095, byte lanes energy[7:0], energy[15:8],
// flags) and lut_rdata is valid the cycle after a read; samples arriving
// meanwhile are dropped.  Crystal numbers 24..31 are ignored and read as 0.
//
// The 16-bit energy, the flags, the 12-bit address and three LUTs per FLINK
// follow the document.  Splitting the crystals over the banks in blocks of
// CPL, and dropping samples while the i960 owns the tables, are choices of
// this design.
module lut_correction
  import upc_pkg::*;
#(
  parameter int N_LUT = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         lut_en,
  input  logic         in_valid,
  input  raw_sample_t  in,
  output logic         out_valid,
  output corr_sample_t out,
  input  lut_req_t     lut_req,
  output lut_entry_t   lut_rdata
);

  localparam int CPL  = N_CRYSTAL / N_LUT;      // crystals per bank
  localparam int CW   = $clog2(CPL);
  localparam int AW   = CW + DIG_W;
  localparam int SIZE = CPL << DIG_W;

  logic [N_CRYSTAL-1:0][DIG_W-1:0] cur;   // codes of the sample being corrected
  logic          busy;
  logic [CW:0]   step;            // lookup index being issued
  logic          rvalid_q;        // a lookup result is arriving this cycle
  logic [CW-1:0] ridx_q;          // which crystal index it belongs to

  logic [N_LUT-1:0][AW-1:0] addr;
  lut_entry_t [N_LUT-1:0]   rdata;
  logic [N_LUT-1:0]         bank_we;
  logic [N_LUT-1:0]         bank_hit_q;

  // bank / local index of the i960 access
  logic [4:0] cpu_bank;
  logic [4:0] cpu_local;  // upper bits are zero for CPL <= 8
  assign cpu_bank  = 5'(lut_req.crystal / 5'(CPL));
  assign cpu_local = 5'(lut_req.crystal % 5'(CPL));

  always_comb begin
    for (int b = 0; b < N_LUT; b++) begin
      if (lut_en) begin
        addr[b]    = {cpu_local[CW-1:0], lut_req.dig};
        bank_we[b] = lut_req.wr && cpu_bank == 5'(b);
      end else begin
        addr[b]    = {step[CW-1:0], cur[b*CPL + int'(step[CW-1:0])]};
        bank_we[b] = 1'b0;
      end
    end
  end

  for (genvar b = 0; b < N_LUT; b++) begin : g_bank
    logic [7:0] mem_lo [SIZE];
    logic [7:0] mem_hi [SIZE];
    logic [1:0] mem_fl [SIZE];
    always_ff @(posedge clk) begin
      if (bank_we[b]) begin
        if (lut_req.be[0]) mem_lo[addr[b]] <= lut_req.wdata.energy[7:0];
        if (lut_req.be[1]) mem_hi[addr[b]] <= lut_req.wdata.energy[15:8];
        if (lut_req.be[2]) mem_fl[addr[b]] <= {lut_req.wdata.add, lut_req.wdata.fex};
      end
      rdata[b] <= {mem_fl[addr[b]], mem_hi[addr[b]], mem_lo[addr[b]]};
    end
  end

  // lookup sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      step       <= '0;
      rvalid_q   <= 1'b0;
      ridx_q     <= '0;
      out_valid  <= 1'b0;
      out        <= '0;
      cur        <= '0;
      bank_hit_q <= '0;
    end else begin
      out_valid <= 1'b0;
      rvalid_q  <= 1'b0;
      for (int b = 0; b < N_LUT; b++)
        bank_hit_q[b] <= lut_en && lut_req.rd && cpu_bank == 5'(b);
      if (lut_en) begin
        busy <= 1'b0;
      end else if (!busy && in_valid) begin
        cur        <= in.dig;
        busy       <= 1'b1;
        step       <= '0;
        out.st     <= in.st;
        out.linkerr<= in.linkerr;
      end else if (busy) begin
        rvalid_q <= 1'b1;
        ridx_q   <= step[CW-1:0];
        if (step == (CW+1)'(CPL - 1)) busy <= 1'b0;
        else                          step <= step + 1'b1;
      end
      if (rvalid_q && !lut_en) begin
        for (int b = 0; b < N_LUT; b++) begin
          out.energy[b*CPL + int'(ridx_q)] <= rdata[b].energy;
          out.add[b*CPL + int'(ridx_q)]    <= rdata[b].add;
          out.fex[b*CPL + int'(ridx_q)]    <= rdata[b].fex;
        end
        if (ridx_q == CW'(CPL - 1)) out_valid <= 1'b1;
      end
    end
  end

  always_comb begin
    lut_rdata = '0;
    for (int b = 0; b < N_LUT; b++)
      if (bank_hit_q[b]) lut_rdata = rdata[b];
  end

endmodule
