// ripple_carry_adder: WIDTH-bit adder made of a chain of full_adder cells.
//
// sum = a + b + cin modulo 2**WIDTH, cout is the carry out of the top bit.
// Combinational. It is the building block inside each carry-select block and
// the 4-, 6- and 12-bit adders of the small array multipliers.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] carry;
  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];
endmodule
