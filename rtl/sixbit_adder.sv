// sixbit_adder: 6-bit adder of the 4x4 array multiplier.
//
// s = (a + b) mod 64, a ripple-carry chain of full adders; combinational. In
// the 4x4 multiplier both sums it forms stay below 64 (at most 9 + 36 and
// 15 + 45), so the carry out of bit 5 is always zero and is not brought out.
module sixbit_adder (
  input  logic [5:0] a,
  input  logic [5:0] b,
  output logic [5:0] s
);
  ripple_carry_adder #(.WIDTH(6)) u_rca (
    .a   (a),
    .b   (b),
    .cin (1'b0),
    .sum (s),
    .cout()
  );
endmodule
