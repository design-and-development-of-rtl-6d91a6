// valid_flag: the data-valid flip-flop of the multiplier.
//
// The inverted LOAD signal is stored in a D flip-flop on each rising clock
// edge, so the flag is low while operands are being loaded and rises on the
// first edge after LOAD has fallen, the same edge on which the product of the
// new operands reaches the result register. While clr is high the flag is
// cleared, so a reader also sees a result that was reset as not valid.
// The inverter and flip-flop follow the design; the synchronous clear is this
// design's choice.
module valid_flag (
  input  logic clk,
  input  logic clr,
  input  logic load,
  output logic valid
);
  always_ff @(posedge clk) begin
    if (clr) valid <= 1'b0;
    else     valid <= ~load;
  end
endmodule
