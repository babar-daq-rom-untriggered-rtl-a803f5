// tb_trigger_summer -- self-checking test of the trigger tower sum.
//
// Random energies, ADD masks and offsets, plus directed cases: all crystals
// excluded, a sum exactly at full scale, an overflow that must saturate at
// 0xFFFF even if later crystals would bring it back down, and a negative
// total (clamped to 0).  The reference evaluates the document's loop with
// 64-bit integers.  Also checks the one-clock latency.
module tb_trigger_summer;
  import upc_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [N_CRYSTAL-1:0][15:0] energy = '0;
  logic [N_CRYSTAL-1:0] add = '0;
  logic [15:0] offset = '0;
  logic out_valid;
  logic [15:0] sum;
  int checks = 0, failures = 0;

  trigger_summer dut (.*);

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

  function automatic logic [15:0] model();
    longint s = 0;
    for (int i = 0; i < N_CRYSTAL; i++)
      if (add[i]) begin
        s += longint'(energy[i]) - longint'(offset);
        if (s > 65535) return 16'hFFFF;
      end
    return (s < 0) ? 16'h0 : 16'(s);
  endfunction

  task automatic apply(input string what);
    logic [15:0] exp;
    exp = model();
    @(negedge clk); in_valid = 1;
    @(negedge clk); in_valid = 0;
    check(out_valid, "one-clock latency");
    check(sum == exp, $sformatf("%s: exp %h got %h", what, exp, sum));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      offset = 16'h1000 + 16'($urandom % 4096);
      for (int i = 0; i < N_CRYSTAL; i++) begin
        case ($urandom % 4)
          0: energy[i] = offset - 16'($urandom % 256);       // small negative
          1: energy[i] = offset + 16'($urandom % 1024);
          2: energy[i] = offset + 16'($urandom % 8192);
          default: energy[i] = 16'($urandom);
        endcase
      end
      add = 24'($urandom);
      apply("random");
    end
    add = '0; apply("no crystals");
    offset = 16'd100; add = '1;
    for (int i = 0; i < N_CRYSTAL; i++) energy[i] = 16'd100;
    energy[0] = 16'd100 + 16'hFFFF - 16'd100 + 16'd0;   // first crystal alone at limit
    energy[0] = 16'hFFFF; offset = 16'd0;
    for (int i = 1; i < N_CRYSTAL; i++) energy[i] = 16'd0;
    apply("exactly full scale");
    offset = 16'd1000;
    energy[0] = 16'hFFFF; energy[1] = 16'hFFFF;
    for (int i = 2; i < N_CRYSTAL; i++) energy[i] = 16'd0;
    apply("overflow saturates and stays");
    for (int i = 0; i < N_CRYSTAL; i++) energy[i] = 16'd10;
    apply("negative total");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
