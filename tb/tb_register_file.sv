// tb_register_file -- self-checking test of the i960 register decoder.
//
// Models the LUT and IS read ports of the three FLINKs in the testbench.
// Checks SERNO contents, CTRL and TRIGCTRL read/write with byte enables and
// their reset values, DOUT and LINK_STAT read-only bits, the ADC pins, the
// SWTRIG pulse on any access, the LUT window (decoded only with LUTEN = 1,
// fields FLINK/crystal/range/ADC), and the IS window (FLINK select, bit 16
// not decoded, word select), and that other bases are ignored.
module tb_register_file;
  import upc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] reg_base = 8'h40, is_base = 8'h41, serno = 8'h5C;
  logic [15:0] location = 16'h1234;
  logic [31:0] bus_addr = '0, bus_wdata = '0, bus_rdata;
  logic bus_rd = 0, bus_wr = 0, bus_rvalid, activity;
  logic [3:0] bus_be = 4'hF;
  logic [2:0] en, off_din, off_sclk, off_dout = 3'b101;
  logic lut_en, is_en, sw_trig_en, trig_test, sw_trig;
  logic [9:0] samples; logic [6:0] depth; logic [3:0] frame_offset;
  logic adc_din, adc_clk, adc_cs_n, adc_dout = 1, adc_sstrb = 0;
  logic [2:0] rxdet = 3'b110, lrdy = 3'b011;
  logic [2:0][1:0] lst = {2'd3, 2'd1, 2'd2};
  lut_req_t [2:0] lut_req;
  lut_entry_t [2:0] lut_rdata;
  is_req_t [2:0] is_req;
  logic [2:0][31:0] is_rdata;
  int checks = 0, failures = 0, n_sw = 0;
  lut_req_t last_lut_wr [3];

  register_file dut (.*);

  always #5 clk = ~clk;
  // one-clock read models
  always @(posedge clk) for (int f = 0; f < 3; f++) begin
    lut_rdata[f] <= lut_req[f].rd ? lut_entry_t'({f[0], lut_req[f].crystal, lut_req[f].dig}) : '0;
    is_rdata[f]  <= is_req[f].rd ? {4'(f), 3'd0, is_req[f].hi, 11'd0, is_req[f].offset} : '0;
    if (lut_req[f].wr) last_lut_wr[f] = lut_req[f];
  end
  always @(posedge clk) if (sw_trig) n_sw++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [31:0] a, input logic [31:0] d, input logic [3:0] be = 4'hF);
    @(negedge clk); bus_addr = a; bus_wdata = d; bus_be = be; bus_wr = 1;
    @(negedge clk); bus_wr = 0; bus_be = 4'hF;
  endtask

  task automatic rd(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_rd = 1;
    @(negedge clk); bus_rd = 0;
    check(bus_rvalid, "rvalid one clock after read");
    d = bus_rdata;
  endtask

  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(en == 0 && !lut_en && !is_en && !sw_trig_en && !trig_test, "reset values");
    rd(32'h4000_0000, d);
    check(d == {8'h5C, 7'd0, 1'b1, 16'h1234}, $sformatf("SERNO %h", d));
    // CTRL
    wr(32'h4000_0004, 32'hFFFF_FFFF);
    rd(32'h4000_0004, d);
    check(d == (32'hEEFF_FFFF | {3'd0, off_dout[2], 3'd0, off_dout[1], 3'd0, off_dout[0], 20'd0}), $sformatf("CTRL all ones %h", d));
    wr(32'h4000_0004, {1'b0, 1'b1, 1'b0, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b1, 1'b1, 1'b0, 1'b0,
                       1'b1, 1'b1, 1'b0, 10'd64, 7'd20});
    check(en == 3'b011 && off_din == 3'b101 && off_sclk == 3'b010, "CTRL FLINK bits");
    check(lut_en && is_en && !sw_trig_en && samples == 64 && depth == 20, "CTRL fields");
    wr(32'h4000_0004, 32'h0000_00_05, 4'b0001);    // byte 0 only
    check(depth == 5 && samples == 64 && en == 3'b011, "CTRL byte enable");
    // LINK_STAT
    rd(32'h4000_0008, d);
    check(d[18:17] == 2'b10 && d[11:0] == {1'b1, 1'b0, 2'd3, 1'b1, 1'b1, 2'd1, 1'b0, 1'b1, 2'd2}, $sformatf("LINK_STAT %h", d));
    check(d[31:22] == 0 && d[16:12] == 0, "LINK_STAT zero bits");
    wr(32'h4000_0008, 32'h0030_0000);
    check(adc_din == 1 && adc_clk == 1 && adc_cs_n == 0, "ADC pins");
    wr(32'h4000_0008, 32'h0008_0000, 4'b0010);    // wrong byte lane: ignored
    check(adc_cs_n == 0, "LINK_STAT byte enable");
    // TRIGCTRL
    wr(32'h4000_000C, 32'h1B);
    rd(32'h4000_000C, d);
    check(d == 32'h1B && trig_test && frame_offset == 4'hB, "TRIGCTRL");
    // SWTRIG on write and on read
    n_sw = 0;
    wr(32'h4000_0010, 0);
    rd(32'h4000_0010, d);
    @(negedge clk);
    check(n_sw == 2, $sformatf("SWTRIG pulses %0d", n_sw));
    // LUT window (LUTEN is 1)
    wr(32'h4000_0000 | 32'h20_0000 | (1 << 19) | (17 << 14) | (2 << 12) | (10'h2A5 << 2), 32'h0003_BEEF, 4'b0111);
    check(last_lut_wr[1].crystal == 17 && last_lut_wr[1].dig == {2'd2, 10'h2A5} &&
          last_lut_wr[1].wdata == 18'h3_BEEF && last_lut_wr[1].be == 3'b111, "LUT write decode");
    rd(32'h4000_0000 | 32'h20_0000 | (2 << 19) | (23 << 14) | (3 << 12) | (10'h3FF << 2), d);
    check(d == {14'd0, 1'b0, 5'd23, 12'hFFF}, $sformatf("LUT read %h", d));
    rd(32'h4000_0000 | 32'h20_0000 | (3 << 19), d);
    check(d == 0, "LUT FLINK 3 undefined");
    wr(32'h4000_0004, 32'h0, 4'b0100);              // LUTEN = 0 (byte 2)
    check(!lut_en, "LUTEN cleared");
    rd(32'h4000_0000 | 32'h20_0000, d);
    check(d == 0, "LUT not accessible with LUTEN = 0");
    // IS window: FLINK 18:17, bit 16 alias, offset 15:3, word select 2
    for (int f = 0; f < 3; f++)
      for (int alias_bit = 0; alias_bit < 2; alias_bit++) begin
        logic [12:0] o = 13'($urandom);
        rd({8'h41, 5'd0, 2'(f), 1'(alias_bit), o, 1'b1, 2'b00}, d);
        check(d == {4'(f), 3'd0, 1'b1, 11'd0, o}, $sformatf("IS read f%0d alias %0d", f, alias_bit));
        rd({8'h41, 5'd0, 2'(f), 1'(alias_bit), o, 1'b0, 2'b00}, d);
        check(d == {4'(f), 3'd0, 1'b0, 11'd0, o}, "IS low word");
      end
    // other base ignored
    rd(32'h4200_0004, d);
    check(d == 0, "other base reads zero");
    wr(32'h4200_0004, 32'hFFFF_FFFF);
    check(depth == 5, "other base not written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
