// carry_select_adder: WIDTH-bit carry-select adder.
//
// The operands are cut into blocks of BLOCK bits (the top block may be
// narrower). The lowest block is a plain ripple-carry adder fed by cin. Every
// other block holds two ripple-carry adders that add the block with carry-in 0
// and with carry-in 1 at the same time; the carry coming out of the block below
// then only drives a multiplexer that picks one sum and one carry. The carry
// path is thus one mux per block instead of BLOCK full adders.
//
// Interface: sum = a + b + cin modulo 2**WIDTH, cout is the carry out.
// Combinational.
//
// The use of carry-select adders follows the design; the block size of 4 bits
// is this implementation's choice.
module carry_select_adder #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned BLOCK = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NBLK = (WIDTH + BLOCK - 1) / BLOCK;

  logic [NBLK:0] carry;
  assign carry[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    localparam int unsigned LO = k * BLOCK;
    localparam int unsigned BW = (LO + BLOCK > WIDTH) ? WIDTH - LO : BLOCK;

    if (k == 0) begin : g_first
      ripple_carry_adder #(.WIDTH(BW)) u_rca (
        .a   (a[LO +: BW]),
        .b   (b[LO +: BW]),
        .cin (carry[0]),
        .sum (sum[LO +: BW]),
        .cout(carry[1])
      );
    end else begin : g_select
      logic [BW-1:0] sum0, sum1;
      logic          cout0, cout1;

      ripple_carry_adder #(.WIDTH(BW)) u_rca0 (
        .a   (a[LO +: BW]),
        .b   (b[LO +: BW]),
        .cin (1'b0),
        .sum (sum0),
        .cout(cout0)
      );
      ripple_carry_adder #(.WIDTH(BW)) u_rca1 (
        .a   (a[LO +: BW]),
        .b   (b[LO +: BW]),
        .cin (1'b1),
        .sum (sum1),
        .cout(cout1)
      );

      assign sum[LO +: BW] = carry[k] ? sum1 : sum0;
      assign carry[k+1]    = carry[k] ? cout1 : cout0;
    end
  end

  assign cout = carry[NBLK];
endmodule
