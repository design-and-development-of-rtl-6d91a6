// booth_8: registered 8x8 signed Booth multiplier (the "Booth8" device).
//
// Two operand registers capture operand_a (multiplicand) and operand_b
// (multiplier) while load is high. Four Booth units (one per 2-bit group of the
// multiplier, modified Booth recoding) each produce a sign-extended partial
// product of 16, 14, 12 and 10 bits. The partial product adder sums them with
// carry-select adders, skipping the zero bits below each partial product's
// offset, and the result register captures the 16-bit two's-complement product
// z on every rising clock edge. A D flip-flop stores the inverted load as
// end_flag, so end_flag is high exactly when z holds the product of operands
// that are no longer being loaded. clr (active high) clears every register and
// the flag.
//
// Timing: load high at clock edge k captures the operands; if load is low at
// edge k+1, z = operand_a * operand_b and end_flag = 1 after edge k+1 (one
// cycle of latency after the load edge, a product per cycle while load stays
// high, with end_flag low). All registers are clocked on the rising edge and
// cleared synchronously.
//
// The pins, the block structure and the 16/14/12/10-bit partial products follow
// the design. The Booth units recode two bits per unit (four units for eight
// bits); synchronous clear, two's-complement operands and the carry-select block
// size are this implementation's choices. WIDTH may be set to any even size.
module booth_8
  import booth8_pkg::*;
#(
  parameter  int unsigned WIDTH = OPERAND_WIDTH,
  parameter  int unsigned BLOCK = 4,
  localparam int unsigned NPP   = WIDTH / 2,
  localparam int unsigned PW    = 2 * WIDTH
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             load,
  input  logic [WIDTH-1:0] operand_a,
  input  logic [WIDTH-1:0] operand_b,
  output logic             end_flag,
  output logic [PW-1:0]    z
);
  logic [WIDTH-1:0]       reg_a, reg_b;
  logic [NPP-1:0][PW-1:0] pp;
  booth_digit_e [NPP-1:0] digit;
  logic [PW-1:0]          product;

  operand_register #(.WIDTH(WIDTH)) u_reg_a (
    .clk(clk), .clr(clr), .load(load), .d(operand_a), .q(reg_a)
  );
  operand_register #(.WIDTH(WIDTH)) u_reg_b (
    .clk(clk), .clr(clr), .load(load), .d(operand_b), .q(reg_b)
  );

  for (genvar i = 0; i < NPP; i++) begin : g_unit
    localparam int unsigned W = PW - 2 * i;
    booth_unit #(.WIDTH(WIDTH), .INDEX(i)) u_booth (
      .a    (reg_a),
      .b    (reg_b),
      .digit(digit[i]),
      .pp   (pp[i][W-1:0])
    );
    if (i > 0) begin : g_pad
      assign pp[i][PW-1:W] = '0;
    end
  end

  pp_adder #(.WIDTH(WIDTH), .BLOCK(BLOCK)) u_adder (
    .pp     (pp),
    .product(product)
  );

  result_register #(.WIDTH(PW)) u_result (
    .clk(clk), .clr(clr), .d(product), .q(z)
  );

  valid_flag u_valid (
    .clk(clk), .clr(clr), .load(load), .valid(end_flag)
  );
endmodule
