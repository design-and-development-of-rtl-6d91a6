// tb_ebm: exhaustive self-checking testbench for the 8x8 array multiplier:
// every unsigned operand pair against integer multiplication.
module tb_ebm;
  logic [7:0]  a, b;
  logic [15:0] q;
  int checks = 0, failures = 0;

  ebm dut (.*);

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (q !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d = %0d", i, j, q);
        end
      end
    end
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
