// twobit_multi: unsigned 2x2-bit multiplier, the smallest cell of the array
// multipliers.
//
// c = a * b (4 bits). Four AND gates form the partial products; two half
// adders (XOR for the sum, AND for the carry) combine the middle column and
// its carry. Combinational. Only the name and the 2-bit operands come from the
// design; the gate network is the usual one.
module twobit_multi (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] c
);
  logic p00, p01, p10, p11, k;
  assign p00  = a[0] & b[0];
  assign p10  = a[1] & b[0];
  assign p01  = a[0] & b[1];
  assign p11  = a[1] & b[1];
  assign c[0] = p00;
  assign c[1] = p10 ^ p01;
  assign k    = p10 & p01;
  assign c[2] = p11 ^ k;
  assign c[3] = p11 & k;
endmodule
