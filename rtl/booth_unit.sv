// booth_unit: one Booth unit, the partial product generator for digit INDEX.
//
// The multiplier operand b is read in overlapping 3-bit groups
// {b[2i+1], b[2i], b[2i-1]} (b[-1] = 0). Unit INDEX recodes its group into a
// digit d in {-2,-1,0,+1,+2} and outputs d * a, where a is the signed
// multiplicand. The multiple is formed by selecting a or 2a and, for a
// negative digit, inverting it and adding one. The result is sign-extended to
// PP_WIDTH = 2*WIDTH - 2*INDEX bits: partial product i is later added at bit
// position 2*i, so bits above 2*WIDTH are never needed. For the 8-bit
// multiplier this gives the 16, 14, 12 and 10-bit outputs of units 0..3.
//
// Both operands are two's-complement. Combinational; the unit also reports its
// digit on `digit` for observation.
//
// The four units and their output widths follow the design's block diagram;
// the recoding table is the standard one for this grouping.
module booth_unit
  import booth8_pkg::*;
#(
  parameter  int unsigned WIDTH    = OPERAND_WIDTH,
  parameter  int unsigned INDEX    = 0,
  localparam int unsigned PP_WIDTH = 2 * WIDTH - 2 * INDEX
) (
  input  logic [WIDTH-1:0]    a,      // multiplicand
  input  logic [WIDTH-1:0]    b,      // multiplier; only its group is used
  output booth_digit_e        digit,
  output logic [PP_WIDTH-1:0] pp
);
  logic [WIDTH:0]    b_ext;      // b with the implicit b[-1] = 0 appended
  logic [2:0]        grp;
  logic [PP_WIDTH-1:0] a_sx;     // a sign-extended
  logic [PP_WIDTH-1:0] mag;      // a or 2a
  logic              neg;

  assign b_ext = {b, 1'b0};
  assign grp   = b_ext[2*INDEX +: 3];
  assign digit = booth_recode(grp);
  assign a_sx  = {{(PP_WIDTH-WIDTH){a[WIDTH-1]}}, a};

  always_comb begin
    unique case (digit)
      DIGIT_P1, DIGIT_M1: mag = a_sx;
      DIGIT_P2, DIGIT_M2: mag = a_sx << 1;
      default:            mag = '0;
    endcase
    neg = (digit == DIGIT_M1) || (digit == DIGIT_M2);
    pp  = neg ? (~mag + PP_WIDTH'(1)) : mag;
  end
endmodule
