// tb_sixbit_adder: exhaustive self-checking testbench for the 6-bit adder
// (sum modulo 64).
module tb_sixbit_adder;
  logic [5:0] a, b, s;
  int checks = 0, failures = 0;

  sixbit_adder dut (.*);

  initial begin
    for (int i = 0; i < 64; i++) begin
      for (int j = 0; j < 64; j++) begin
        a = 6'(i); b = 6'(j);
        #1;
        checks++;
        if (s !== 6'(i + j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d+%0d = %0d", i, j, s);
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
