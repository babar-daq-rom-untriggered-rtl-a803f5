// trigger_interface -- sends the three tower sums to the level-one
// calorimeter trigger as bit-serial words on the system clock.
//
// FRAME generation: a counter of the 16 bit periods of a word, reset by a
// CLINK Sync, runs on the system clock; `frame` is high in the cycle the
// counter equals frame_offset, so the word boundary can be placed where the
// trigger expects it.  In that cycle all three 16-bit shift registers load
// at once (the sums change only every 16 clocks, so loading them together
// resynchronises the FLINKs); in the other cycles they shift towards bit 0.
// The outputs are the bit-0 ends, LSB first, and frame_out, which is high
// while bit 0 of a word is on the data lines.
//
// Test mode (trig_test = 1): the words are zero until a Spy Start command;
// then the next two frames carry a test sequence once: the first word has a
// one that walks across the lines (bit i is set on FLINK A when i mod 3 = 1,
// on B when i mod 3 = 2, on C when i mod 3 = 0), the second word holds the
// board serial number in bits 7:0 and the FLINK number (A = 0, B = 1, C = 2)
// in bits 9:8.
//
// The 16-bit serial words, the common load, the Sync-reset frame counter and
// the test sequence follow the document.  The document calls the counter
// sixteen bit but its offset field is four bits wide and a word is sixteen
// clocks, so the counter here counts modulo 16.  Starting playback at the
// frame after Spy Start is this design's choice.
module trigger_interface
  import upc_pkg::*;
(
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              sync,
  input  logic                              spy_start,
  input  logic [3:0]                        frame_offset,
  input  logic                              trig_test,
  input  logic [7:0]                        serno,
  input  logic [N_FLINK-1:0][ENERGY_W-1:0]  tower_sum,
  output logic [N_FLINK-1:0]                data,
  output logic                              frame_out,
  output logic                              playback_done
);

  logic [3:0] cnt;
  logic       frame;
  logic [N_FLINK-1:0][15:0] sr;
  logic       armed;
  logic [1:0] play;          // 0: idle, 1: send test word 0 next, 2: word 1 next

  assign frame = cnt == frame_offset;

  function automatic logic [15:0] test_word(input int f, input logic second,
                                            input logic [7:0] sn);
    logic [15:0] w = '0;
    if (!second) begin
      for (int i = 0; i < 16; i++) w[i] = (i % 3) == ((f + 1) % 3);
    end else begin
      w[7:0] = sn;
      w[9:8] = 2'(f);
    end
    return w;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; sr <= '0; frame_out <= 1'b0; armed <= 1'b0; play <= '0;
      playback_done <= 1'b0;
    end else begin
      cnt           <= sync ? 4'd0 : cnt + 4'd1;
      frame_out     <= frame;
      playback_done <= 1'b0;
      if (spy_start && trig_test) armed <= 1'b1;
      if (!trig_test) begin
        armed <= 1'b0;
        play  <= '0;
      end
      if (frame) begin
        for (int f = 0; f < N_FLINK; f++) begin
          if (!trig_test)      sr[f] <= tower_sum[f];
          else if (play == 2'd1) sr[f] <= test_word(f, 1'b0, serno);
          else if (play == 2'd2) sr[f] <= test_word(f, 1'b1, serno);
          else                 sr[f] <= '0;
        end
        if (trig_test) begin
          if (play == 2'd1)      play <= 2'd2;
          else if (play == 2'd2) begin
            play <= 2'd0;
            playback_done <= 1'b1;
          end
        end
      end else begin
        for (int f = 0; f < N_FLINK; f++) sr[f] <= {1'b0, sr[f][15:1]};
      end
      // playback starts at the frame after the command was seen
      if (armed && trig_test && play == 2'd0 && !frame) begin
        play  <= 2'd1;
        armed <= 1'b0;
      end
    end
  end

  for (genvar f = 0; f < N_FLINK; f++) begin : g_out
    assign data[f] = sr[f][0];
  end

endmodule
