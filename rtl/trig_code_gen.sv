// trig_code_gen: RD53B trigger pattern encoder.
//
// The chip is told which bunch crossings to read out with trigger commands: an
// 8-bit trigger symbol that marks which of four consecutive bunch crossings carry
// a trigger, followed by an 8-bit tag symbol. This module turns a stream of trigger
// pulses (one trigger pulse spans four clock cycles, i.e. one bunch crossing) into
// such commands.
//
// How it works (all counters start at zero on reset and run freely):
//   * Pulse processing: a 2-bit trigger counter splits time into 4-cycle windows.
//     The input is sampled every cycle into a pulse shift register; on the last
//     cycle of a window (counter = 3) the three stored samples and the current one
//     are OR'ed into one trigger bit, so a pulse at any cycle of the window counts.
//   * Pattern: that bit is shifted into a 4-bit trigger pattern register and a
//     2-bit command counter advances. When the command counter wraps (every 16
//     cycles) the pattern is complete; the earliest window lands in bit 3.
//   * Command word: a complete non-zero pattern gives {trig_symbol, tag_symbol};
//     an all-zero pattern gives the idle frame. A 6-bit tag counter, wrapping
//     after TAG_MAX, advances with every command word.
//   * Output: the first word of each 32-cycle interval waits in the first word
//     register; the second is appended and the 32-bit pair {first, second} is
//     presented on code_o. code_ready_o is high while the generator is enabled and
//     at least one half of code_o is a trigger command. code_update_o pulses for
//     one cycle on the cycle after code_o changes.
//
// Timing: counting clock edges from the first one after reset, window w covers
// edges 4w..4w+3, command word k covers windows 4k..4k+3, and the pair made of
// words 2p and 2p+1 is registered at edge 32p+31. A word is produced every 16
// cycles and code_o changes every 32 cycles.
//
// The window/pattern/tag structure, register widths, wrap of the tag counter after
// 49 and the output cadence follow the design description. Forming the trigger bit
// from three stored samples plus the current one (so the pattern shift happens in
// the same cycle as the OR), advancing the tag on every word including idle ones,
// and the code_update_o strobe are this implementation's choices.
module trig_code_gen
  import rd53b_pkg::*;
#(
  parameter int unsigned TAG_MAX = 49   // last tag base before the counter wraps
) (
  input  logic      clk_i,
  input  logic      rst_i,          // synchronous, active high
  input  logic      enable_i,       // trigger code generator enable register
  input  logic      trig_i,         // (extended) trigger pulse
  output cmd_word_t code_o,         // {first word, second word}
  output logic      code_ready_o,   // enabled and code_o holds a trigger command
  output logic      code_update_o   // one-cycle strobe: code_o has just changed
);

  logic [2:0] pulse_sr;        // last three samples of the current window
  logic [1:0] trig_cnt;        // cycle within the 4-cycle window
  logic [3:0] pattern_sr;      // trigger bits of the current 16-cycle interval
  logic [1:0] cmd_cnt;         // window within the 16-cycle interval
  logic [5:0] tag_cnt;         // tag base
  logic       word_phase;      // 0: next word is the first of a pair
  frame_t     first_word;

  logic       trig_bit;
  logic [3:0] pattern_next;
  frame_t     word_next;

  assign trig_bit     = |{pulse_sr, trig_i};
  assign pattern_next = {pattern_sr[2:0], trig_bit};
  assign word_next    = (pattern_next == 4'b0000) ? IDLE_FRAME
                                                  : {trig_symbol(pattern_next), tag_symbol(tag_cnt)};

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      pulse_sr      <= '0;
      trig_cnt      <= '0;
      pattern_sr    <= '0;
      cmd_cnt       <= '0;
      tag_cnt       <= '0;
      word_phase    <= 1'b0;
      first_word    <= IDLE_FRAME;
      code_o        <= IDLE_WORD;
      code_update_o <= 1'b0;
    end else begin
      pulse_sr      <= {pulse_sr[1:0], trig_i};
      trig_cnt      <= trig_cnt + 2'd1;
      code_update_o <= 1'b0;
      if (trig_cnt == 2'd3) begin
        pattern_sr <= pattern_next;
        cmd_cnt    <= cmd_cnt + 2'd1;
        if (cmd_cnt == 2'd3) begin
          // a complete 16-bit command word
          tag_cnt    <= (tag_cnt >= 6'(TAG_MAX)) ? 6'd0 : tag_cnt + 6'd1;
          word_phase <= ~word_phase;
          if (!word_phase) begin
            first_word <= word_next;
          end else begin
            code_o        <= {first_word, word_next};
            code_update_o <= 1'b1;
          end
        end
      end
    end
  end

  assign code_ready_o = enable_i && (code_o != IDLE_WORD);

  initial begin
    assert (TAG_MAX < NUM_TAGS) else $error("TAG_MAX must select a defined tag symbol");
  end

endmodule
