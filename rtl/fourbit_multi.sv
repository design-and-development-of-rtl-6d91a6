// fourbit_multi: unsigned 4x4 multiplier built from 2x2 multipliers.
//
// The operands are split into halves, a = {aH, aL}, b = {bH, bL}, and four
// twobit_multi cells form q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH. The
// product is q0 + 4*(q1 + q2) + 16*q3, summed by three adders:
//   a5 (4-bit):  q4 = q1 + q0[3:2]
//   a6 (6-bit):  q5 = q2 + (q3 << 2)
//   a7 (6-bit):  q6 = q4 + q5
// and c = {q6, q0[1:0]}. The two low product bits need no adder at all.
// Combinational; interface a, b (4 bits each), c (8 bits).
//
// The cells (a1..a4 2x2 multipliers, a5 4-bit adder, a6/a7 6-bit adders, a
// constant zero feeding the padding) follow the design; the assignment of the
// halves to each adder is chosen so that the internal values q0..q6 match the
// design's simulation trace.
module fourbit_multi (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] c
);
  logic [3:0] q0, q1, q2, q3;
  logic [4:0] q4;
  logic [5:0] q5, q6;

  twobit_multi a1 (.a(a[1:0]), .b(b[1:0]), .c(q0));
  twobit_multi a2 (.a(a[3:2]), .b(b[1:0]), .c(q1));
  twobit_multi a3 (.a(a[1:0]), .b(b[3:2]), .c(q2));
  twobit_multi a4 (.a(a[3:2]), .b(b[3:2]), .c(q3));

  fourbit_adder a5 (.a(q1), .b({2'b00, q0[3:2]}), .s(q4));
  sixbit_adder  a6 (.a({2'b00, q2}), .b({q3, 2'b00}), .s(q5));
  sixbit_adder  a7 (.a({1'b0, q4}), .b(q5), .s(q6));

  assign c = {q6, q0[1:0]};
endmodule
