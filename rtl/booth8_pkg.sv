// booth8_pkg: types and constants shared by the Booth multiplier blocks.
//
// The multiplier recodes its multiplier operand two bits at a time (modified
// Booth, overlapping 3-bit groups), so each group selects one of five digits
// {-2,-1,0,+1,+2}. The operand width of 8 bits is the design's main size; the
// 3-bit group to digit table is the standard modified Booth table.
package booth8_pkg;

  // Operand width of the main configuration (two 8-bit operands, 16-bit product).
  localparam int unsigned OPERAND_WIDTH = 8;

  // One recoded Booth digit.
  typedef enum logic [2:0] {
    DIGIT_ZERO = 3'd0,
    DIGIT_P1   = 3'd1,
    DIGIT_P2   = 3'd2,
    DIGIT_M1   = 3'd3,
    DIGIT_M2   = 3'd4
  } booth_digit_e;

  // Recode the group {b[2i+1], b[2i], b[2i-1]} into a digit:
  // value = -2*b[2i+1] + b[2i] + b[2i-1].
  function automatic booth_digit_e booth_recode(input logic [2:0] grp);
    unique case (grp)
      3'b001, 3'b010: return DIGIT_P1;
      3'b011:         return DIGIT_P2;
      3'b100:         return DIGIT_M2;
      3'b101, 3'b110: return DIGIT_M1;
      default:        return DIGIT_ZERO;  // 000 and 111
    endcase
  endfunction

endpackage
