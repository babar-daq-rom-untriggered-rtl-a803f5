// tb_presample_buffer -- self-checking test of the presample delay line.
//
// Streams numbered samples at the 16-clock sample rate and, for several
// depths including 0 and the maximum 127, checks that each output is the
// sample written `depth` samples earlier and appears one clock after the
// input strobe.
module tb_presample_buffer;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [511:0] din = '0, dout;
  logic [6:0] depth = '0;
  logic out_valid;
  int checks = 0, failures = 0;

  presample_buffer #(.W(512), .DEPTH_MAX(128)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [511:0] pat(input int k);
    return {16{32'(k * 32'h9E3779B9)}};
  endfunction

  initial begin
    int k;
    int depths [5] = '{0, 1, 5, 64, 127};
    repeat (2) @(negedge clk);
    rst_n = 1;
    k = 0;
    foreach (depths[d]) begin
      depth = 7'(depths[d]);
      for (int i = 0; i < 300; i++) begin
        @(negedge clk); din = pat(k); in_valid = 1;
        @(negedge clk); in_valid = 0;
        check(out_valid, "one-clock latency");
        // after a depth change the first `depth` outputs come from before it
        if (i >= 130) check(dout == pat(k - depths[d]), $sformatf("depth %0d sample %0d", depths[d], k));
        k++;
        repeat (14) @(negedge clk);
        check(!out_valid, "single strobe");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
