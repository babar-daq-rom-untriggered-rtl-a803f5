// tb_edge_fex -- self-checking test of the edge FEX bits.
//
// Sets each crystal's FEX bit alone and checks which of the ten edge bits
// it drives, from its position in the 8 x 3 barrel tower (corner crystals
// drive a corner bit, a north/south bit and east/west; middle-row crystals
// only east or west; crystals of columns 3 and 4 on the north and south rows
// drive both halves, which overlap), then tests random patterns against a
// reference OR and checks local_any / neigh_any.
module tb_edge_fex;
  import upc_pkg::*;
  logic [23:0] fex = '0;
  logic [9:0]  edge_in = '0, edge_out;
  logic local_any, neigh_any;
  int checks = 0, failures = 0;

  edge_fex dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // edges touched by crystal at column c (0 = west), row r (0 = north)
  function automatic logic [9:0] edges_of(input int c, input int r);
    logic [9:0] e = '0;
    if (r == 0) begin if (c <= 4) e[0] = 1; if (c >= 3) e[1] = 1; end
    if (r == 2) begin if (c <= 4) e[5] = 1; if (c >= 3) e[6] = 1; end
    if (c == 7) e[3] = 1;
    if (c == 0) e[8] = 1;
    if (c == 7 && r == 0) e[2] = 1;
    if (c == 7 && r == 2) e[4] = 1;
    if (c == 0 && r == 2) e[7] = 1;
    if (c == 0 && r == 0) e[9] = 1;
    return e;
  endfunction

  initial begin
    logic [9:0] exp;
    for (int n = 0; n < 24; n++) begin
      fex = 24'd1 << n; #1;
      check(edge_out == edges_of(n / 3, n % 3), $sformatf("crystal %0d edges %b", n, edge_out));
      check(local_any, "local_any");
    end
    for (int t = 0; t < 200; t++) begin
      fex = 24'($urandom) & 24'($urandom); edge_in = 10'($urandom) & 10'($urandom);
      #1;
      exp = '0;
      for (int n = 0; n < 24; n++) if (fex[n]) exp |= edges_of(n / 3, n % 3);
      check(edge_out == exp, "random pattern");
      check(local_any == (fex != 0) && neigh_any == (edge_in != 0), "any flags");
    end
    fex = '0; edge_in = '0; #1;
    check(edge_out == '0 && !local_any && !neigh_any, "all clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
