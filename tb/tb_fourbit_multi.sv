// tb_fourbit_multi: self-checking testbench for the 4x4 array multiplier.
//
// First the four operand pairs of the reference trace (13*5 = 65, 8*12 = 96,
// 14*10 = 140, 15*12 = 180) with their internal adder results, then every
// operand pair against integer multiplication.
module tb_fourbit_multi;
  logic [3:0] a, b;
  logic [7:0] c;
  int checks = 0, failures = 0;

  fourbit_multi dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %0d*%0d = %0d", what, a, b, c);
    end
  endtask

  initial begin
    // Reference trace: product, output of the 4-bit adder, output of the
    // first 6-bit adder.
    a = 4'd13; b = 4'd5;  #1 check(c == 8'd65  && dut.q4 == 5'd3 && dut.q5 == 6'd13, "trace 1");
    a = 4'd8;  b = 4'd12; #1 check(c == 8'd96  && dut.q4 == 5'd0 && dut.q5 == 6'd24, "trace 2");
    a = 4'd14; b = 4'd10; #1 check(c == 8'd140 && dut.q4 == 5'd7 && dut.q5 == 6'd28, "trace 3");
    a = 4'd15; b = 4'd12; #1 check(c == 8'd180 && dut.q5 == 6'd45, "trace 4");
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1 check(c == 8'(i * j), "exhaustive");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
