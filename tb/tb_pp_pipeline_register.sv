// tb_pp_pipeline_register: self-checking testbench for the partial product
// pipeline register.
//
// Random partial products, load and clr each cycle. After each rising edge
// pp_out[i] must hold the low 16-2*i bits of pp_in[i] from before the edge
// (the bits above zero), and valid the inverse of load; everything is zero
// after a clear.
module tb_pp_pipeline_register;
  logic             clk = 1'b0;
  logic             clr, load;
  logic [3:0][15:0] pp_in, pp_out, model;
  logic             valid, vmodel;
  int checks = 0, failures = 0;

  pp_pipeline_register #(.WIDTH(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int n = 0; n < 2000; n++) begin
      clr   = ($urandom % 6) == 0;
      load  = 1'($urandom);
      pp_in = {16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom)};
      for (int i = 0; i < 4; i++) model[i] = clr ? 16'h0 : pp_in[i] & (16'hFFFF >> (2 * i));
      vmodel = clr ? 1'b0 : ~load;
      @(posedge clk); #1;
      checks++;
      if (pp_out !== model || valid !== vmodel) begin
        failures++;
        if (failures < 10) $display("FAIL pp_out=%h model=%h valid=%b", pp_out, model, valid);
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
