// tb_led_stretcher -- self-checking test of the LED pulse stretcher.
//
// With STRETCH = 50, a one-clock pulse must light the LED for exactly 50
// clocks; a second pulse during that time restarts the count; a steady level
// keeps it lit.
module tb_led_stretcher;
  logic clk = 0, rst_n = 0, pulse = 0;
  logic led;
  int checks = 0, failures = 0;

  led_stretcher #(.STRETCH(50)) dut (.*);

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

  task automatic count_on(output int n);
    n = 0;
    while (led) begin @(negedge clk); n++; end
  endtask

  initial begin
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!led, "off after reset");
    pulse = 1; @(negedge clk); pulse = 0;
    count_on(n);
    check(n == 50, $sformatf("lit for %0d clocks", n));
    pulse = 1; @(negedge clk); pulse = 0;
    repeat (30) @(negedge clk);
    pulse = 1; @(negedge clk); pulse = 0;
    count_on(n);
    check(n == 50, "retriggered");
    pulse = 1;
    repeat (200) begin @(negedge clk); check(led, "steady level"); end
    pulse = 0;
    count_on(n);
    check(n == 50, "after level");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
