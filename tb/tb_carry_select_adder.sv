// tb_carry_select_adder: self-checking testbench for the carry-select adder.
//
// Tests the default 16-bit adder and a 10-bit one whose top block is only two
// bits wide, with random operands and carry-in plus carry chains that run
// through every block (all ones plus one). Expected sums come from plain
// integer addition.
module tb_carry_select_adder;
  logic [15:0] a16, b16, s16;
  logic        c16, co16;
  logic [9:0]  a10, b10, s10;
  logic        c10, co10;
  int checks = 0, failures = 0;

  carry_select_adder dut16 (.a(a16), .b(b16), .cin(c16), .sum(s16), .cout(co16));
  carry_select_adder #(.WIDTH(10), .BLOCK(4)) dut10 (
    .a(a10), .b(b10), .cin(c10), .sum(s10), .cout(co10));

  task automatic apply(input logic [15:0] x, input logic [15:0] y, input logic ci);
    logic [16:0] e16;
    logic [10:0] e10;
    a16 = x; b16 = y; c16 = ci;
    a10 = x[9:0]; b10 = y[9:0]; c10 = ci;
    #1;
    e16 = 17'(x) + 17'(y) + 17'(ci);
    e10 = 11'(x[9:0]) + 11'(y[9:0]) + 11'(ci);
    checks += 2;
    if ({co16, s16} !== e16) begin
      failures++;
      if (failures < 10) $display("FAIL 16: %h+%h+%b = %h", x, y, ci, {co16, s16});
    end
    if ({co10, s10} !== e10) begin
      failures++;
      if (failures < 10) $display("FAIL 10: %h+%h+%b = %h", x[9:0], y[9:0], ci, {co10, s10});
    end
  endtask

  initial begin
    apply(16'hFFFF, 16'h0000, 1'b1);
    apply(16'hFFFF, 16'h0001, 1'b0);
    apply(16'h0FFF, 16'h0001, 1'b0);
    apply(16'h8000, 16'h8000, 1'b0);
    apply(16'h0000, 16'h0000, 1'b0);
    for (int n = 0; n < 50000; n++) apply(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
