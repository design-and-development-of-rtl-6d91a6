// booth_multipliers: all multipliers of the design side by side.
//
// - booth_8: registered 8x8 signed Booth multiplier (pins b8_*).
// - booth_8_pipelined: its two-stage pipelined variant (pins b8p_*).
// - fourbit_multi: combinational unsigned 4x4 array multiplier built from
//   2x2 cells (pins b4_*), the "Booth4" result of the design.
// - ebm: combinational unsigned 8x8 array multiplier built from four 4x4
//   cells (pins ebm_*).
// The four share nothing but the clock of the two registered ones. Timing of
// each is given in its own module.
module booth_multipliers
  import booth8_pkg::*;
#(
  parameter  int unsigned WIDTH = OPERAND_WIDTH,
  localparam int unsigned PW    = 2 * WIDTH
) (
  input  logic             clk,

  input  logic             b8_clr,
  input  logic             b8_load,
  input  logic [WIDTH-1:0] b8_operand_a,
  input  logic [WIDTH-1:0] b8_operand_b,
  output logic             b8_end_flag,
  output logic [PW-1:0]    b8_z,

  input  logic             b8p_clr,
  input  logic             b8p_load,
  input  logic [WIDTH-1:0] b8p_operand_a,
  input  logic [WIDTH-1:0] b8p_operand_b,
  output logic             b8p_end_flag,
  output logic [PW-1:0]    b8p_z,

  input  logic [3:0]       b4_a,
  input  logic [3:0]       b4_b,
  output logic [7:0]       b4_c,

  input  logic [7:0]       ebm_a,
  input  logic [7:0]       ebm_b,
  output logic [15:0]      ebm_q
);
  booth_8 #(.WIDTH(WIDTH)) u_booth_8 (
    .clk      (clk),
    .clr      (b8_clr),
    .load     (b8_load),
    .operand_a(b8_operand_a),
    .operand_b(b8_operand_b),
    .end_flag (b8_end_flag),
    .z        (b8_z)
  );

  booth_8_pipelined #(.WIDTH(WIDTH)) u_booth_8_pipelined (
    .clk      (clk),
    .clr      (b8p_clr),
    .load     (b8p_load),
    .operand_a(b8p_operand_a),
    .operand_b(b8p_operand_b),
    .end_flag (b8p_end_flag),
    .z        (b8p_z)
  );

  fourbit_multi u_fourbit_multi (.a(b4_a), .b(b4_b), .c(b4_c));

  ebm u_ebm (.a(ebm_a), .b(ebm_b), .q(ebm_q));
endmodule
