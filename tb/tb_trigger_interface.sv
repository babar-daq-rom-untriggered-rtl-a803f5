// tb_trigger_interface -- self-checking test of the trigger serialiser.
//
// A receiver in the testbench collects 16 bits LSB first from every frame
// mark.  Checks: frame period of 16 clocks, frame position set by the offset
// relative to a Sync, all three sums loaded at the same frame, and in test
// mode zero words until Spy Start, then the walking-one word and the serial
// number / FLINK number word exactly once, then zeros again.
module tb_trigger_interface;
  import upc_pkg::*;
  logic clk = 0, rst_n = 0, sync = 0, spy_start = 0, trig_test = 0;
  logic [3:0] frame_offset = 4'd5;
  logic [7:0] serno = 8'hA7;
  logic [2:0][15:0] tower_sum = '0;
  logic [2:0] data;
  logic frame_out, playback_done;
  int checks = 0, failures = 0, n_frames = 0, last_frame = -1, now = 0;
  logic [2:0][15:0] rx [$];
  logic [2:0][15:0] sh;
  int bitn = -1;

  trigger_interface dut (.*);

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

  // serial receiver
  always @(posedge clk) if (rst_n) begin
    now++;
    if (frame_out) begin
      if (last_frame >= 0) check(now - last_frame == 16, "frame period 16");
      last_frame = now;
      n_frames++;
      bitn = 0;
    end
    if (bitn >= 0) begin
      for (int f = 0; f < 3; f++) sh[f][bitn] = data[f];
      bitn++;
      if (bitn == 16) begin rx.push_back(sh); bitn = -1; end
    end
  end

  function automatic logic [15:0] walk(input int f);
    logic [15:0] w;
    for (int i = 0; i < 16; i++) w[i] = (i % 3) == ((f + 1) % 3);
    return w;
  endfunction

  initial begin
    int t0;
    logic [2:0][15:0] sums [$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    // frame position after Sync
    @(negedge clk); sync = 1; @(negedge clk); sync = 0;
    t0 = now;
    while (!frame_out) @(negedge clk);
    check(now - t0 == 6, $sformatf("frame %0d clocks after Sync with offset 5", now - t0));
    // energy words: change the sums right after each frame
    rx.delete();
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      while (!frame_out) @(negedge clk);
      tower_sum = {16'($urandom), 16'($urandom), 16'($urandom)};
      sums.push_back(tower_sum);
    end
    repeat (40) @(negedge clk);
    // rx[0] is the word in flight when rx was cleared, rx[1] the one already
    // loaded at the first loop frame; sums[k] goes out in the following frame
    for (int k = 0; k < 18; k++) check(rx[k+2] == sums[k], $sformatf("sum word %0d", k));
    // test mode
    trig_test = 1;
    repeat (60) @(negedge clk);
    rx.delete();
    repeat (40) @(negedge clk);
    check(rx.size() >= 2 && rx[0] == '0 && rx[1] == '0, "test mode idle words are zero");
    @(negedge clk); spy_start = 1; @(negedge clk); spy_start = 0;
    rx.delete();
    repeat (100) @(negedge clk);
    begin
      int k = -1;
      for (int i = 0; i < rx.size(); i++) if (rx[i] != '0) begin k = i; break; end
      check(k >= 0 && k <= 1, "playback starts at the next frame");
      if (k >= 0) begin
        for (int f = 0; f < 3; f++) begin
          check(rx[k][f] == walk(f), $sformatf("walking word FLINK %0d: %h", f, rx[k][f]));
          check(rx[k+1][f] == {6'd0, 2'(f), serno}, $sformatf("serial word FLINK %0d: %h", f, rx[k+1][f]));
        end
        for (int i = k + 2; i < rx.size(); i++) check(rx[i] == '0, "sent once only");
      end
    end
    check(n_frames > 20, "frames seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
