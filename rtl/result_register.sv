// result_register: the register at the multiplier's output.
//
// It has no enable: on every rising clock edge it takes d, or clears to zero
// while clr is high (synchronous clear, this design's choice). It holds the
// 16-bit product in the main configuration; the pipelined multiplier also uses
// it one bit wider to carry the data-valid flag along with the product.
module result_register #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             clr,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (clr) q <= '0;
    else     q <= d;
  end
endmodule
