// tb_circular_buffer -- self-checking test of the intermediate store.
//
// Writes random 64-bit words at random addresses and reads both 32-bit
// halves back through the i960 view, checking the word select and the
// one-clock read latency, including the last and first words of the buffer.
module tb_circular_buffer;
  import upc_pkg::*;
  logic clk = 0, we = 0;
  logic [12:0] waddr = '0;
  logic [63:0] wdata = '0;
  is_req_t rreq = '0;
  logic [31:0] rdata;
  int checks = 0, failures = 0;
  logic [63:0] model [int];

  circular_buffer dut (.*);

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

  initial begin
    int a;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      a = (i < 2) ? (i == 0 ? 8191 : 0) : int'($urandom % 8192);
      we = 1; waddr = 13'(a); wdata = {$urandom, $urandom}; model[a] = wdata;
    end
    @(negedge clk); we = 0;
    foreach (model[k]) begin
      for (int h = 0; h < 2; h++) begin
        @(negedge clk); rreq.rd = 1; rreq.offset = 13'(k); rreq.hi = h[0];
        @(negedge clk); rreq.rd = 0;
        check(rdata == (h ? model[k][63:32] : model[k][31:0]), $sformatf("addr %0d half %0d", k, h));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
