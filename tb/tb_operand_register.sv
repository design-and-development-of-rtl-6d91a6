// tb_operand_register: self-checking testbench for the operand register.
//
// Random clr, load and data each cycle; a reference copy of the register kept
// here (clear first, then load, else hold) is compared with q after every
// rising edge.
module tb_operand_register;
  logic       clk = 1'b0;
  logic       clr, load;
  logic [7:0] d, q, model;
  int checks = 0, failures = 0;

  operand_register #(.WIDTH(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    clr = 1'b1; load = 1'b0; d = '0; model = '0;
    @(posedge clk); #1;
    clr = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      clr  = ($urandom % 8) == 0;
      load = 1'($urandom);
      d    = 8'($urandom);
      @(posedge clk); #1;
      if (clr) model = '0;
      else if (load) model = d;
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
