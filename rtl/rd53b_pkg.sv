// rd53b_pkg: symbols and helper functions of the RD53B command protocol shared by
// the TX core modules.
//
// Every RD53B command is a stream of DC-balanced 8-bit symbols (four ones and four
// zeros each), sent MSB first, two symbols per 16-bit frame. This package holds:
//   * the idle (PLL lock) frame, an alternating 1010... pattern;
//   * trig_symbol(): the 15 trigger symbols, one per non-empty 4-bit trigger
//     pattern. Bit 3 of the pattern is the earliest of the four bunch crossings,
//     so pattern 4'b1000 ("T000") asks for the first one;
//   * tag_symbol(): the 54 tag symbols that carry a 6-bit tag base.
// The trigger symbols are the ones listed for the design. The tag table (the 32
// data symbols followed by 22 further balanced symbols) and the idle value follow
// the RD53B protocol itself; only entries 0..49 are reached by the tag counter.
package rd53b_pkg;

  typedef logic [7:0]  symbol_t;
  typedef logic [15:0] frame_t;
  typedef logic [31:0] cmd_word_t;

  // PLL lock / idle frame: alternating ones and zeros
  localparam frame_t IDLE_FRAME = 16'hAAAA;
  localparam cmd_word_t IDLE_WORD = {IDLE_FRAME, IDLE_FRAME};

  // Number of tag symbols defined by the protocol
  localparam int unsigned NUM_TAGS = 54;

  // Trigger symbol for a 4-bit pattern (pattern[3] = first bunch crossing).
  // Pattern 0 has no symbol: an empty interval is sent as the idle frame.
  function automatic symbol_t trig_symbol(input logic [3:0] pattern);
    unique case (pattern)
      4'b0001: return 8'h2B;
      4'b0010: return 8'h2D;
      4'b0011: return 8'h2E;
      4'b0100: return 8'h33;
      4'b0101: return 8'h35;
      4'b0110: return 8'h36;
      4'b0111: return 8'h39;
      4'b1000: return 8'h3A;
      4'b1001: return 8'h3C;
      4'b1010: return 8'h4B;
      4'b1011: return 8'h4D;
      4'b1100: return 8'h4E;
      4'b1101: return 8'h53;
      4'b1110: return 8'h55;
      4'b1111: return 8'h56;
      default: return IDLE_FRAME[15:8];
    endcase
  endfunction

  // Tag symbol for a 6-bit tag base (0..53); out-of-range values map to tag 0.
  function automatic symbol_t tag_symbol(input logic [5:0] tag);
    unique case (tag)
      6'd0:  return 8'h6A;  6'd1:  return 8'h6C;  6'd2:  return 8'h71;  6'd3:  return 8'h72;
      6'd4:  return 8'h74;  6'd5:  return 8'h8B;  6'd6:  return 8'h8D;  6'd7:  return 8'h8E;
      6'd8:  return 8'h93;  6'd9:  return 8'h95;  6'd10: return 8'h96;  6'd11: return 8'h99;
      6'd12: return 8'h9A;  6'd13: return 8'h9C;  6'd14: return 8'hA3;  6'd15: return 8'hA5;
      6'd16: return 8'hA6;  6'd17: return 8'hA9;  6'd18: return 8'h59;  6'd19: return 8'hAC;
      6'd20: return 8'hB1;  6'd21: return 8'hB2;  6'd22: return 8'hB4;  6'd23: return 8'hC3;
      6'd24: return 8'hC5;  6'd25: return 8'hC6;  6'd26: return 8'hC9;  6'd27: return 8'hCA;
      6'd28: return 8'hCC;  6'd29: return 8'hD1;  6'd30: return 8'hD2;  6'd31: return 8'hD4;
      6'd32: return 8'h63;  6'd33: return 8'h5A;  6'd34: return 8'h5C;  6'd35: return 8'hAA;
      6'd36: return 8'h65;  6'd37: return 8'h69;  6'd38: return 8'h2B;  6'd39: return 8'h2D;
      6'd40: return 8'h2E;  6'd41: return 8'h33;  6'd42: return 8'h35;  6'd43: return 8'h36;
      6'd44: return 8'h39;  6'd45: return 8'h3A;  6'd46: return 8'h3C;  6'd47: return 8'h4B;
      6'd48: return 8'h4D;  6'd49: return 8'h4E;  6'd50: return 8'h53;  6'd51: return 8'h55;
      6'd52: return 8'h56;  6'd53: return 8'h66;
      default: return 8'h6A;
    endcase
  endfunction

endpackage
