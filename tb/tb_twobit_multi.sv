// tb_twobit_multi: exhaustive self-checking testbench for the 2x2 multiplier.
module tb_twobit_multi;
  logic [1:0] a, b;
  logic [3:0] c;
  int checks = 0, failures = 0;

  twobit_multi dut (.*);

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i); b = 2'(j);
        #1;
        checks++;
        if (c !== 4'(i * j)) begin
          failures++;
          $display("FAIL %0d*%0d = %0d", i, j, c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
