// pp_adder: adds the Booth partial products into the product.
//
// Partial product i is worth pp_i * 4**i. Instead of padding each one with 2*i
// zeros and adding full-width words, the adder is a chain: the running sum is
// shifted right by two bits at each step, its two low bits go straight to the
// product (nothing is added to them any more), and the remaining bits are added
// to the next partial product with a carry-select adder of that partial
// product's width. For an 8-bit multiplier the adders are 14, 12 and 10 bits
// wide. All sums are modulo 2**(2*WIDTH), which is exact for two's-complement
// partial products sign-extended to their width, so each adder's carry out is
// not used.
//
// Interface: pp[i] holds partial product i in its low 2*WIDTH-2*i bits; the
// bits above are ignored. product is the 2*WIDTH-bit sum. Combinational.
//
// Carry-select adders and the skipping of the offset zeros follow the design;
// the chained order of the additions is this implementation's choice.
module pp_adder
  import booth8_pkg::*;
#(
  parameter  int unsigned WIDTH = OPERAND_WIDTH,
  parameter  int unsigned BLOCK = 4,
  localparam int unsigned NPP   = WIDTH / 2,
  localparam int unsigned PW    = 2 * WIDTH
) (
  input  logic [NPP-1:0][PW-1:0] pp,
  output logic [PW-1:0]          product
);
  // acc[i] is the sum of partial products 0..i, shifted right by 2*i,
  // in its low PW-2*i bits.
  logic [NPP-1:0][PW-1:0] acc;

  assign acc[0] = pp[0];

  for (genvar i = 1; i < NPP; i++) begin : g_stage
    localparam int unsigned W = PW - 2 * i;

    carry_select_adder #(.WIDTH(W), .BLOCK(BLOCK)) u_csa (
      .a   (acc[i-1][W+1:2]),
      .b   (pp[i][W-1:0]),
      .cin (1'b0),
      .sum (acc[i][W-1:0]),
      .cout()
    );
    assign acc[i][PW-1:W]        = '0;
    assign product[2*i-1 -: 2]   = acc[i-1][1:0];
  end

  assign product[PW-1:2*(NPP-1)] = acc[NPP-1][PW-2*(NPP-1)-1:0];
endmodule
