// rd53b_tx_core: TX core of the readout firmware with the RD53B trigger pattern
// encoder.
//
// The TX core sends commands to an RD53B readout chip over one serial line. Trigger
// pulses (from the existing trigger unit, which is outside this design and arrives
// on trig_i) first pass the trigger extender, which can lengthen them by a
// software-set number of cycles. The trigger code generator turns the pulses into
// RD53B trigger commands (trigger symbol plus tag) or idle frames, 32 bits every 32
// cycles. The TX channel sends those words with the highest priority, otherwise
// the word offered on cmd_word_i (the core's other command sources), otherwise
// idle. Software configures the extension interval (Wishbone 0x20) and the
// generator enable (Wishbone 0x21).
//
// Interface: one clock and a synchronous active-high reset; a classic Wishbone
// slave (8-bit address, 32-bit data); trig_i; the lower-priority command word with
// valid/read; the serial output cmd_o, with sel_o telling which source the word on
// the line came from.
//
// Timing: trigger pulses are grouped into 4-cycle bunch-crossing windows counted
// from reset; a pulse in windows 8p..8p+7 is sent in the 32-bit word whose first
// bit leaves on the cycle after edge 32p+32, i.e. 33 to 64 cycles after the pulse.
//
// The block partition, the register addresses and the priority of the trigger code
// follow the design description; widths and handshakes are this design's choices.
module rd53b_tx_core
  import rd53b_pkg::*;
#(
  parameter int unsigned ADR_W   = 8,
  parameter int unsigned DAT_W   = 32,
  parameter int unsigned EXT_W   = 32,
  parameter int unsigned TAG_MAX = 49
) (
  input  logic             clk_i,
  input  logic             rst_i,
  // Wishbone slave (configuration registers)
  input  logic [ADR_W-1:0] wb_adr_i,
  input  logic [DAT_W-1:0] wb_dat_i,
  output logic [DAT_W-1:0] wb_dat_o,
  input  logic             wb_cyc_i,
  input  logic             wb_stb_i,
  input  logic             wb_we_i,
  output logic             wb_ack_o,
  // trigger pulse from the trigger unit
  input  logic             trig_i,
  // lower-priority command words
  input  cmd_word_t        cmd_word_i,
  input  logic             cmd_valid_i,
  output logic             cmd_read_o,
  // serial command output to the chip
  output logic             cmd_o,
  output logic [1:0]       sel_o
);

  logic [EXT_W-1:0] trig_ext_interval;
  logic             trig_code_en;
  logic             trig_ext;
  cmd_word_t        trig_code;
  logic             trig_code_ready;
  logic             trig_code_update;

  tx_core_regs #(
    .ADR_W (ADR_W),
    .DAT_W (DAT_W),
    .EXT_W (EXT_W)
  ) u_regs (
    .clk_i               (clk_i),
    .rst_i               (rst_i),
    .wb_adr_i            (wb_adr_i),
    .wb_dat_i            (wb_dat_i),
    .wb_dat_o            (wb_dat_o),
    .wb_cyc_i            (wb_cyc_i),
    .wb_stb_i            (wb_stb_i),
    .wb_we_i             (wb_we_i),
    .wb_ack_o            (wb_ack_o),
    .trig_ext_interval_o (trig_ext_interval),
    .trig_code_en_o      (trig_code_en)
  );

  trigger_extender #(
    .EXT_W (EXT_W)
  ) u_ext (
    .clk_i      (clk_i),
    .rst_i      (rst_i),
    .interval_i (trig_ext_interval),
    .trig_i     (trig_i),
    .trig_o     (trig_ext)
  );

  trig_code_gen #(
    .TAG_MAX (TAG_MAX)
  ) u_gen (
    .clk_i         (clk_i),
    .rst_i         (rst_i),
    .enable_i      (trig_code_en),
    .trig_i        (trig_ext),
    .code_o        (trig_code),
    .code_ready_o  (trig_code_ready),
    .code_update_o (trig_code_update)
  );

  tx_channel u_chan (
    .clk_i        (clk_i),
    .rst_i        (rst_i),
    .trig_code_i  (trig_code),
    .trig_ready_i (trig_code_ready),
    .cmd_word_i   (cmd_word_i),
    .cmd_valid_i  (cmd_valid_i),
    .cmd_read_o   (cmd_read_o),
    .cmd_o        (cmd_o),
    .sel_o        (sel_o)
  );

  // The generator's output changes on the cycle before the channel loads a word,
  // so every generated word is seen by exactly one load.
  a_update_before_load: assert property (@(posedge clk_i) disable iff (rst_i)
    trig_code_update |-> u_chan.bit_cnt == 5'd0);

endmodule
