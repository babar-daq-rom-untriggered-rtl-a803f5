// tb_lut_correction -- self-checking test of the look-up-table correction.
//
// Writes random table entries for random codes through the i960 port (some
// with partial byte enables), reads them back, then corrects samples built
// from those codes and compares energy/ADD/FEX of all 24 crystals with a
// reference copy of the tables.  Checks the latency (9 clocks after in_valid, inside the
// 16-clock sample period), that crystals 24..31 are not mapped, and that a
// sample arriving while the i960 owns the tables is dropped.
module tb_lut_correction;
  import upc_pkg::*;

  logic clk = 0, rst_n = 0, lut_en = 1, in_valid = 0;
  raw_sample_t in = '0;
  logic out_valid;
  corr_sample_t out;
  lut_req_t lut_req = '0;
  lut_entry_t lut_rdata;
  int checks = 0, failures = 0;

  lut_correction dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  lut_entry_t ref_tab [int];   // key: crystal*4096 + code

  task automatic lut_write(input int c, input int code, input lut_entry_t e, input logic [2:0] be);
    @(negedge clk);
    lut_req = '0; lut_req.wr = 1; lut_req.crystal = 5'(c); lut_req.dig = 12'(code);
    lut_req.wdata = e; lut_req.be = be;
    @(negedge clk); lut_req = '0;
  endtask

  task automatic lut_read(input int c, input int code, output lut_entry_t e);
    @(negedge clk);
    lut_req = '0; lut_req.rd = 1; lut_req.crystal = 5'(c); lut_req.dig = 12'(code);
    @(negedge clk); lut_req = '0; e = lut_rdata;
  endtask

  initial begin
    raw_sample_t s [8];
    lut_entry_t e, r;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // random samples and their table entries
    for (int p = 0; p < 8; p++)
      for (int n = 0; n < N_CRYSTAL; n++) begin
        s[p].dig[n] = 12'($urandom);
        e = lut_entry_t'($urandom);
        ref_tab[n*4096 + int'(s[p].dig[n])] = e;
      end
    foreach (ref_tab[k]) lut_write(k / 4096, k % 4096, ref_tab[k], 3'b111);
    // byte lanes: rewrite only the high energy byte of one entry
    begin
      int k = N_CRYSTAL*4096/2 + 5;
      lut_write(k / 4096, k % 4096, 18'h3_1234, 3'b111);
      lut_write(k / 4096, k % 4096, 18'h0_AB00, 3'b010);
      lut_read(k / 4096, k % 4096, r);
      check(r == 18'h3_AB34, "byte-lane write");
    end
    // read back
    foreach (ref_tab[k]) begin
      lut_read(k / 4096, k % 4096, r);
      check(r == ref_tab[k], $sformatf("read back crystal %0d code %0h", k/4096, k%4096));
    end
    // crystals 24..31 are not mapped
    lut_write(25, 7, 18'h2_5555, 3'b111);
    lut_read(25, 7, r);
    check(r == '0, "crystal 25 reads zero");
    // a sample while the i960 owns the tables is dropped
    @(negedge clk); in = s[0]; in_valid = 1; @(negedge clk); in_valid = 0;
    repeat (20) begin @(negedge clk); check(!out_valid, "no output while LUTEN=1"); end
    lut_en = 0;
    for (int p = 0; p < 8; p++) begin
      int lat;
      lat = 0;
      @(negedge clk); in = s[p]; in.st = fe_status_t'($urandom); in.linkerr = p[0];
      in_valid = 1;
      @(negedge clk); in_valid = 0;
      while (!out_valid && lat < 40) begin @(negedge clk); lat++; end
      check(lat == 9, $sformatf("latency %0d", lat));
      for (int n = 0; n < N_CRYSTAL; n++) begin
        e = ref_tab[n*4096 + int'(s[p].dig[n])];
        check(out.energy[n] == e.energy && out.add[n] == e.add && out.fex[n] == e.fex,
              $sformatf("sample %0d crystal %0d", p, n));
      end
      check(out.st == in.st && out.linkerr == in.linkerr, "status passed through");
      repeat (7) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
