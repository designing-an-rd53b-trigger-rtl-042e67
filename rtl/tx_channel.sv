// tx_channel: command priority encoder and serializer of the TX core.
//
// Every 32 clock cycles the channel takes one 32-bit word (two 16-bit RD53B
// frames) and shifts it out MSB first on cmd_o, one bit per cycle. The word is
// chosen by a fixed-priority encoder:
//   1. the trigger code generator's word, whenever trig_ready_i is high (highest);
//   2. otherwise the word offered on cmd_word_i, if cmd_valid_i is high; cmd_read_o
//      pulses for one cycle when that word is taken, so a FIFO can pop it;
//   3. otherwise the idle (PLL lock) pattern, so the line never stops toggling.
//
// Timing: a 5-bit bit counter starts at 0 on reset. On each cycle where it is 0
// the chosen word is loaded, and its MSB appears on cmd_o after that edge; the
// following 31 bits follow on the next 31 cycles. sel_o reports which source was
// loaded for the word now being sent. With the trigger code generator reset at the
// same time, its words (updated on the cycle before each load) are each sent
// exactly once.
//
// Giving the trigger code words the top priority follows the design description.
// The 32-bit word size, MSB-first order, the second source with its read strobe and
// idle filling are this implementation's choices.
module tx_channel
  import rd53b_pkg::*;
(
  input  logic      clk_i,
  input  logic      rst_i,
  input  cmd_word_t trig_code_i,
  input  logic      trig_ready_i,
  input  cmd_word_t cmd_word_i,
  input  logic      cmd_valid_i,
  output logic      cmd_read_o,
  output logic      cmd_o,          // serial command line to the chip
  output logic [1:0] sel_o          // 2: trigger code, 1: command word, 0: idle
);

  logic [4:0] bit_cnt;
  cmd_word_t  shreg;

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      bit_cnt    <= '0;
      shreg      <= IDLE_WORD;
      cmd_read_o <= 1'b0;
      sel_o      <= 2'd0;
    end else begin
      bit_cnt    <= bit_cnt + 5'd1;
      cmd_read_o <= 1'b0;
      if (bit_cnt == 5'd0) begin
        if (trig_ready_i) begin
          shreg <= trig_code_i;
          sel_o <= 2'd2;
        end else if (cmd_valid_i) begin
          shreg      <= cmd_word_i;
          sel_o      <= 2'd1;
          cmd_read_o <= 1'b1;
        end else begin
          shreg <= IDLE_WORD;
          sel_o <= 2'd0;
        end
      end else begin
        shreg <= {shreg[30:0], 1'b0};
      end
    end
  end

  assign cmd_o = shreg[31];

endmodule
