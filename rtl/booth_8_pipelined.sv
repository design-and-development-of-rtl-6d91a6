// booth_8_pipelined: pipelined variant of the 8x8 signed Booth multiplier.
//
// Same pins and arithmetic as booth_8, with one more register stage. The input
// registers capture the operands while load is high. Stage 1 stores the four
// Booth units' partial products together with the data-valid flag (the
// inverted load). Stage 2 adds the stored partial products with the
// carry-select partial product adder and stores the product with the flag in
// the result register. The longest path is thus split between Booth recoding
// and the addition.
//
// Timing: load high at rising edge k captures the operands; the partial
// products are stored at edge k+1 and the product appears on z at edge k+2
// with end_flag high if load was low at edge k+1. With load held high a new
// product leaves every cycle but end_flag stays low. clr (active high,
// synchronous) clears every register.
//
// The two pipeline stages and what each stores follow the design; where the
// flag is formed (at the first stage, so that it travels with the partial
// products) is this implementation's reading of it.
module booth_8_pipelined
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
  logic [NPP-1:0][PW-1:0] pp, pp_q;
  booth_digit_e [NPP-1:0] digit;
  logic                   valid_q;
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

  // Stage 1: partial products and valid flag.
  pp_pipeline_register #(.WIDTH(WIDTH)) u_stage1 (
    .clk   (clk),
    .clr   (clr),
    .load  (load),
    .pp_in (pp),
    .pp_out(pp_q),
    .valid (valid_q)
  );

  pp_adder #(.WIDTH(WIDTH), .BLOCK(BLOCK)) u_adder (
    .pp     (pp_q),
    .product(product)
  );

  // Stage 2: product and valid flag.
  result_register #(.WIDTH(PW + 1)) u_result (
    .clk(clk), .clr(clr), .d({valid_q, product}), .q({end_flag, z})
  );
endmodule
