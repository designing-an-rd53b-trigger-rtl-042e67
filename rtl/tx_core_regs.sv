// tx_core_regs: Wishbone configuration registers added to the TX core for the
// RD53B trigger pattern encoder.
//
// Two read/write registers on a classic (single-cycle acknowledge) Wishbone slave:
//   0x20  trigger extension interval, in clock cycles (0 = no extension)
//   0x21  trigger code generator enable (bit 0)
// A write to either address updates it; a read returns it, zero-extended. Any
// other address inside this slave acknowledges and reads as zero, so the TX
// core's other registers can be decoded elsewhere.
//
// Timing: ack_o is registered and rises one cycle after cyc_i and stb_i are seen,
// for one cycle; the written value is visible on the register outputs in the same
// cycle as ack_o. Both registers clear to 0 on reset, so the extender is in
// pass-through and the generator disabled.
//
// The two addresses follow the design description; the bus width, the reset
// values and the handshake style are this implementation's choices.
module tx_core_regs #(
  parameter int unsigned ADR_W = 8,
  parameter int unsigned DAT_W = 32,
  parameter int unsigned EXT_W = 32,
  parameter logic [ADR_W-1:0] ADR_TRIG_EXT = 'h20,
  parameter logic [ADR_W-1:0] ADR_TRIG_EN  = 'h21
) (
  input  logic             clk_i,
  input  logic             rst_i,
  // Wishbone slave
  input  logic [ADR_W-1:0] wb_adr_i,
  input  logic [DAT_W-1:0] wb_dat_i,
  output logic [DAT_W-1:0] wb_dat_o,
  input  logic             wb_cyc_i,
  input  logic             wb_stb_i,
  input  logic             wb_we_i,
  output logic             wb_ack_o,
  // register outputs
  output logic [EXT_W-1:0] trig_ext_interval_o,
  output logic             trig_code_en_o
);

  logic req;
  assign req = wb_cyc_i && wb_stb_i && !wb_ack_o;

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      wb_ack_o            <= 1'b0;
      wb_dat_o            <= '0;
      trig_ext_interval_o <= '0;
      trig_code_en_o      <= 1'b0;
    end else begin
      wb_ack_o <= req;
      if (req) begin
        wb_dat_o <= '0;
        unique case (wb_adr_i)
          ADR_TRIG_EXT: begin
            if (wb_we_i) trig_ext_interval_o <= EXT_W'(wb_dat_i);
            wb_dat_o <= DAT_W'(trig_ext_interval_o);
          end
          ADR_TRIG_EN: begin
            if (wb_we_i) trig_code_en_o <= wb_dat_i[0];
            wb_dat_o <= DAT_W'(trig_code_en_o);
          end
          default: ;
        endcase
      end
    end
  end

  // Wishbone rule: an acknowledge only answers a cycle in progress
  property p_ack_in_cycle;
    @(posedge clk_i) disable iff (rst_i) wb_ack_o |-> $past(wb_cyc_i && wb_stb_i);
  endproperty
  a_ack_in_cycle: assert property (p_ack_in_cycle);

endmodule
