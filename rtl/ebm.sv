// ebm: unsigned 8x8 multiplier built from 4x4 multipliers.
//
// The same split as in fourbit_multi, one level up: a = {aH, aL},
// b = {bH, bL} with 4-bit halves. Four fourbit_multi cells (z1..z4) form
// q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH (8 bits each), and
//   8-bit adder: q4 = q1 + q0[7:4]
//   ddba g1:     q5 = q2 + (q3 << 4)      (12 bits)
//   ddba g2:     q6 = q4 + q5             (12 bits)
// give q = {q6, q0[3:0]}. Combinational; interface a, b (8 bits), q (16 bits).
//
// The four 4x4 cells, the 8-bit adder and the two 12-bit ddba adders (one fed
// with constant zeros) follow the design; which partial product goes to which
// adder is this implementation's reading, mirroring fourbit_multi.
module ebm (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] q
);
  logic [7:0]  q0, q1, q2, q3;
  logic [7:0]  q4;
  logic [11:0] q5, q6;

  fourbit_multi z1 (.a(a[3:0]), .b(b[3:0]), .c(q0));
  fourbit_multi z2 (.a(a[7:4]), .b(b[3:0]), .c(q1));
  fourbit_multi z3 (.a(a[3:0]), .b(b[7:4]), .c(q2));
  fourbit_multi z4 (.a(a[7:4]), .b(b[7:4]), .c(q3));

  // The 8-bit adder never overflows: q1 + q0[7:4] <= 225 + 14.
  assign q4 = q1 + {4'h0, q0[7:4]};

  ddba g1 (.a({4'h0, q2}), .b({q3, 4'h0}), .s(q5));
  ddba g2 (.a({4'h0, q4}), .b(q5), .s(q6));

  assign q = {q6, q0[3:0]};
endmodule
