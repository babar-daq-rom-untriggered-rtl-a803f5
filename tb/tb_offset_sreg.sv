// tb_offset_sreg -- self-checking test of the serially loaded LUT offset.
//
// Loads random 16-bit values LSB first by toggling the data and clock bits
// as software would, checks the loaded value, and checks that the previous
// value comes out on dout, LSB first, while the new one is shifted in.
module tb_offset_sreg;
  logic clk = 0, din = 0, sclk = 0;
  logic dout;
  logic [15:0] value;
  int checks = 0, failures = 0;

  offset_sreg dut (.*);

  always #5 clk = ~clk;
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

  initial begin
    logic [15:0] prev, v, outbits;
    repeat (2) @(negedge clk);
    for (int t = 0; t < 20; t++) begin
      v = 16'($urandom);
      prev = value;
      for (int i = 0; i < 16; i++) begin
        outbits[i] = dout;            // bit about to fall out
        @(negedge clk); din = v[i];
        @(negedge clk); sclk = 1;
        repeat (2) @(negedge clk);   // holding the clock high shifts only once
        sclk = 0;
        @(negedge clk);
      end
      check(value == v, $sformatf("loaded %h got %h", v, value));
      if (t > 0) check(outbits == prev, "old value read back on dout");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
