// trigger_extender: stretches trigger pulses by a programmable number of cycles.
//
// Lets software lengthen a trigger pulse so that it covers more bunch-crossing
// windows of the trigger code generator. With an interval of 0 the input passes
// straight through (combinationally). With an interval N > 0 the output stays high
// while the input is high and for N further cycles after the input falls: a pulse
// of L cycles leaves as a pulse of L + N cycles. A new pulse during the extension
// restarts the count.
//
// How it works: a down-counter is reloaded with N on every cycle the input is high
// and counts down to zero otherwise; the output is the input OR'ed with "counter
// not zero". The interval is sampled while the input is high, so changing it only
// affects later pulses.
//
// The pass-through at 0 and the extension by the given number of cycles follow the
// design description; the counter structure and the retrigger behaviour are this
// implementation's choices.
module trigger_extender #(
  parameter int unsigned EXT_W = 32      // width of the extension interval register
) (
  input  logic             clk_i,
  input  logic             rst_i,        // synchronous, active high
  input  logic [EXT_W-1:0] interval_i,   // extension in clock cycles
  input  logic             trig_i,
  output logic             trig_o
);

  logic [EXT_W-1:0] remain;

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      remain <= '0;
    end else if (trig_i) begin
      remain <= interval_i;
    end else if (remain != '0) begin
      remain <= remain - 1'b1;
    end
  end

  assign trig_o = trig_i || (remain != '0);

endmodule
