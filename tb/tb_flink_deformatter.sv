// tb_flink_deformatter -- self-checking test of the FLINK packet deformatter.
//
// Builds random packets word by word from the packet map (crystal n in
// column n/4, rows of four words; status bits 19/18 in words 1..15), sends
// them with idle gaps, and compares every decoded field.  Also checks that
// words n_prev the first control word are ignored, that a premature control
// word flags sync_err and drops the partial packet, that the link error is
// ORed over the packet, and that out_valid comes one clock after word 15.
module tb_flink_deformatter;
  import upc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ctrl = 0, lrdy = 1, err = 0;
  logic [WORD_W-1:0] in_word = '0;
  logic out_valid, sync_err;
  raw_sample_t out;
  int checks = 0, failures = 0, n_out = 0, n_syncerr = 0;

  flink_deformatter dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && out_valid) n_out++;
    if (rst_n && sync_err)  n_syncerr++;
  end

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

  function automatic logic [N_WORDS-1:0][WORD_W-1:0] encode(input raw_sample_t s);
    logic [N_WORDS-1:0][WORD_W-1:0] w = '0;
    for (int n = 0; n < N_CRYSTAL; n++)
      for (int q = 0; q < 4; q++)
        for (int b = 0; b < 3; b++)
          w[4*(n%4) + q][3*(n/4) + b] = s.dig[n][3*q + b];
    for (int i = 0; i < 10; i++) begin w[1+i][19] = s.st.wall[i]; w[1+i][18] = s.st.hdr[i]; end
    for (int i = 0; i < 4; i++)  begin w[11+i][19] = s.st.tphase[i]; w[11+i][18] = s.st.cphase[i]; end
    w[15][19] = s.st.tr; w[15][18] = s.st.cs;
    return w;
  endfunction

  function automatic raw_sample_t rand_sample();
    raw_sample_t s;
    for (int n = 0; n < N_CRYSTAL; n++) s.dig[n] = 12'($urandom);
    s.st = fe_status_t'($urandom);
    s.linkerr = 1'b0;
    return s;
  endfunction

  task automatic send(input raw_sample_t s, input int nwords, input int errword);
    logic [N_WORDS-1:0][WORD_W-1:0] w = encode(s);
    for (int i = 0; i < nwords; i++) begin
      @(negedge clk);
      in_valid = 1; in_ctrl = (i == 0); in_word = w[i]; err = (i == errword);
      if (($urandom % 4) == 0 && i != nwords-1) begin
        @(negedge clk); in_valid = 0; err = 0; in_word = 20'($urandom);
      end
    end
    @(negedge clk); in_valid = 0; in_ctrl = 0; err = 0;
  endtask

  initial begin
    raw_sample_t s;
    int n_prev;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // data words n_prev any control word are ignored
    repeat (20) begin
      @(negedge clk); in_valid = 1; in_ctrl = 0; in_word = 20'($urandom);
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
    check(n_out == 0, "output before synchronisation");

    for (int p = 0; p < 40; p++) begin
      int ew;
      s = rand_sample();
      ew = (p % 5 == 0) ? int'($urandom % 16) : -1;
      n_prev = n_out;
      send(s, 16, ew);
      // send() returns at the negedge after the last word: out_valid is high now
      check(out_valid, "out_valid one cycle after word 15");
      check(out.dig == s.dig, $sformatf("crystal codes packet %0d", p));
      check(out.st == s.st, $sformatf("status fields packet %0d", p));
      check(out.linkerr == (ew >= 0), $sformatf("link error packet %0d", p));
      @(negedge clk);
      check(n_out == n_prev + 1, "exactly one sample per packet");
    end
    // premature control word: partial packet dropped, sync_err flagged
    n_prev = n_out;
    send(rand_sample(), 9, -1);
    s = rand_sample();
    send(s, 16, -1);
    check(out.dig == s.dig && out.st == s.st, "packet after resync");
    @(negedge clk);
    check(n_out == n_prev + 1, "partial packet dropped");
    check(n_syncerr == 1, "sync_err pulsed once");
    // link not ready counts as an error
    s = rand_sample();
    lrdy = 0; send(s, 16, -1); lrdy = 1;
    check(out.linkerr, "link not ready flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
