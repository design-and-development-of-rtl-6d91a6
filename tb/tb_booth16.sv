// tb_booth16: the registered Booth multiplier built at 16-bit operands.
//
// The same RTL as the 8-bit multiplier with WIDTH = 16: eight Booth units with
// 32, 30, ..., 18-bit partial products and a chain of seven carry-select
// adders. Extreme operands (-32768, 32767, 0, -1, 1 in every combination) and
// random pairs are loaded with one-cycle load pulses; one edge later z must be
// the 32-bit signed product and end_flag high. Both registered variants are
// checked, the pipelined one one edge later.
module tb_booth16;
  logic        clk = 1'b0;
  logic        clr, load;
  logic [15:0] operand_a, operand_b;
  logic        end_flag, end_flag_p;
  logic [31:0] z, z_p;
  int checks = 0, failures = 0;

  booth_8 #(.WIDTH(16)) dut (.*);
  booth_8_pipelined #(.WIDTH(16)) dut_p (
    .clk(clk), .clr(clr), .load(load), .operand_a(operand_a), .operand_b(operand_b),
    .end_flag(end_flag_p), .z(z_p));

  always #5 clk = ~clk;

  task automatic pulse(input logic [15:0] a, input logic [15:0] b);
    logic [31:0] e;
    e = 32'($signed(a) * $signed(b));
    operand_a = a; operand_b = b; load = 1'b1;
    @(posedge clk); #1;
    load = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (z !== e || !end_flag) begin
      failures++;
      if (failures < 10) $display("FAIL %0d*%0d = %0d", $signed(a), $signed(b), $signed(z));
    end
    @(posedge clk); #1;
    checks++;
    if (z_p !== e || !end_flag_p) begin
      failures++;
      if (failures < 10) $display("FAIL pipelined %0d*%0d = %0d", $signed(a), $signed(b), $signed(z_p));
    end
  endtask

  localparam logic [15:0] EXTREMES[5] = '{16'h8000, 16'h7FFF, 16'h0000, 16'hFFFF, 16'h0001};

  initial begin
    clr = 1'b1; load = 1'b0; operand_a = '0; operand_b = '0;
    repeat (3) @(posedge clk);
    #1 clr = 1'b0;
    foreach (EXTREMES[i]) foreach (EXTREMES[j]) pulse(EXTREMES[i], EXTREMES[j]);
    for (int n = 0; n < 20000; n++) pulse(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
