// tb_ddba: self-checking testbench for the 12-bit adder (sum modulo 4096),
// with random operands and carry chains across all twelve bits.
module tb_ddba;
  logic [11:0] a, b, s;
  int checks = 0, failures = 0;

  ddba dut (.*);

  task automatic apply(input logic [11:0] x, input logic [11:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (s !== 12'(x + y)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d+%0d = %0d", x, y, s);
    end
  endtask

  initial begin
    apply(12'hFFF, 12'h001);
    apply(12'h7FF, 12'h001);
    apply(12'hABC, 12'h544);
    for (int n = 0; n < 20000; n++) apply(12'($urandom), 12'($urandom));
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
