// tb_result_register: self-checking testbench for the result register.
//
// Random data and clr each cycle; after every rising edge q must be the data
// present before the edge, or zero if clr was high.
module tb_result_register;
  logic        clk = 1'b0;
  logic        clr;
  logic [15:0] d, q, model;
  int checks = 0, failures = 0;

  result_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    clr = 1'b0; d = '0;
    for (int n = 0; n < 2000; n++) begin
      clr = ($urandom % 6) == 0;
      d   = 16'($urandom);
      model = clr ? 16'h0 : d;
      @(posedge clk); #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL q=%h model=%h", q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
