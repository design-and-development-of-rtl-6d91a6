// fourbit_adder: 4-bit adder of the 4x4 array multiplier.
//
// s = a + b as a 5-bit sum (the carry out is bit 4). A ripple-carry chain of
// full adders; combinational. The width of the sum is this design's choice,
// taken so that no carry is lost in the 4x4 multiplier.
module fourbit_adder (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [4:0] s
);
  ripple_carry_adder #(.WIDTH(4)) u_rca (
    .a   (a),
    .b   (b),
    .cin (1'b0),
    .sum (s[3:0]),
    .cout(s[4])
  );
endmodule
