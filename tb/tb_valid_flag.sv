// tb_valid_flag: self-checking testbench for the data-valid flip-flop.
//
// Random load and clr each cycle; after every rising edge valid must be the
// inverse of the load seen at that edge, or zero while clr was high.
module tb_valid_flag;
  logic clk = 1'b0;
  logic clr, load, valid, model;
  int checks = 0, failures = 0;

  valid_flag dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int n = 0; n < 2000; n++) begin
      clr  = ($urandom % 5) == 0;
      load = 1'($urandom);
      model = clr ? 1'b0 : ~load;
      @(posedge clk); #1;
      checks++;
      if (valid !== model) begin
        failures++;
        if (failures < 10) $display("FAIL clr=%b load=%b valid=%b", clr, load, valid);
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
