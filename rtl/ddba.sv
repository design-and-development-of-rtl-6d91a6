// ddba: 12-bit adder of the 8x8 array multiplier (ebm).
//
// s = (a + b) mod 4096, a ripple-carry chain of full adders; combinational.
// In ebm both sums it forms stay below 4096 (at most 225 + 3600 and
// 239 + 3825), so the carry out of bit 11 is always zero and is not brought
// out. The name and the 12-bit sum follow the design; the ripple structure is
// this implementation's choice.
module ddba (
  input  logic [11:0] a,
  input  logic [11:0] b,
  output logic [11:0] s
);
  ripple_carry_adder #(.WIDTH(12)) u_rca (
    .a   (a),
    .b   (b),
    .cin (1'b0),
    .sum (s),
    .cout()
  );
endmodule
