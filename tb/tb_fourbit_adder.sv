// tb_fourbit_adder: exhaustive self-checking testbench for the 4-bit adder
// (5-bit sum).
module tb_fourbit_adder;
  logic [3:0] a, b;
  logic [4:0] s;
  int checks = 0, failures = 0;

  fourbit_adder dut (.*);

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (s !== 5'(i + j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d+%0d = %0d", i, j, s);
        end
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
