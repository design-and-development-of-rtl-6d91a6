// pp_pipeline_register: first pipeline stage of the pipelined multiplier.
//
// It stores the Booth units' partial products together with the data-valid
// flag, so that the partial product adder works on registered values in the
// next cycle. The valid flag is formed here as in valid_flag: the inverted
// LOAD is stored. On each rising clock edge everything is cleared while clr is
// high (synchronous, this design's choice), else loaded.
//
// pp_in[i] holds partial product i in its low 2*WIDTH-2*i bits; only those bits
// are stored, the bits above read as zero on pp_out.
module pp_pipeline_register #(
  parameter  int unsigned WIDTH = 8,
  localparam int unsigned NPP   = WIDTH / 2,
  localparam int unsigned PW    = 2 * WIDTH
) (
  input  logic                   clk,
  input  logic                   clr,
  input  logic                   load,
  input  logic [NPP-1:0][PW-1:0] pp_in,
  output logic [NPP-1:0][PW-1:0] pp_out,
  output logic                   valid
);
  // Partial product i only has its low PW-2*i bits; the rest are not stored.
  always_ff @(posedge clk) begin
    for (int i = 0; i < NPP; i++) begin
      if (clr) pp_out[i] <= '0;
      else     pp_out[i] <= pp_in[i] & ({PW{1'b1}} >> (2 * i));
    end
  end

  valid_flag u_valid (
    .clk  (clk),
    .clr  (clr),
    .load (load),
    .valid(valid)
  );
endmodule
