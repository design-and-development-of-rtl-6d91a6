// operand_register: holds one multiplier operand.
//
// On a rising clock edge the register clears to zero while clr is high,
// otherwise takes d while load is high, otherwise holds. q is the stored
// operand. Clear and load are active high as at the multiplier's pins; the
// clear being synchronous and taking priority over load is this design's
// choice.
module operand_register #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (clr)       q <= '0;
    else if (load) q <= d;
  end
endmodule
