// tb_booth_8: self-checking testbench for the registered Booth multiplier.
//
// Multiplies every pair of signed 8-bit operands: load is raised for one
// cycle, and on the next rising edge z must equal the product (worked out
// here with the simulator's signed multiply) and end_flag must be 1. It also
// checks that clr clears z and end_flag, and that end_flag stays low while
// load is held high although z keeps following the operands with one cycle of
// latency. The product must also stay in z while load is low and the
// operand pins change. A watchdog ends the run if it hangs.
module tb_booth_8;
  logic        clk = 1'b0;
  logic        clr, load;
  logic [7:0]  operand_a, operand_b;
  logic        end_flag;
  logic [15:0] z;
  int          checks = 0, failures = 0;

  booth_8 dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: a=%0d b=%0d z=%0d end_flag=%0b", what,
                                  $signed(operand_a), $signed(operand_b), $signed(z), end_flag);
    end
  endtask

  function automatic logic [15:0] expect_product(logic [7:0] a, logic [7:0] b);
    return 16'($signed(a) * $signed(b));
  endfunction

  initial begin
    clr = 1'b1; load = 1'b0; operand_a = '0; operand_b = '0;
    repeat (2) @(posedge clk);
    #1 check(z == 16'h0 && end_flag == 1'b0, "clear");
    clr = 1'b0;

    // Every operand pair, one load pulse each.
    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        operand_a = 8'(ia); operand_b = 8'(ib); load = 1'b1;
        @(posedge clk); #1;
        check(end_flag == 1'b0, "end_flag low during load");
        load = 1'b0;
        operand_a = 8'($urandom); operand_b = 8'($urandom);  // not loaded
        @(posedge clk); #1;
        check(end_flag == 1'b1, "end_flag after load");
        check(z == expect_product(8'(ia), 8'(ib)), "product");
        @(posedge clk); #1;
        check(z == expect_product(8'(ia), 8'(ib)) && end_flag == 1'b1, "product held");
      end
    end

    // Load held high: a product per cycle, flag low.
    load = 1'b1;
    for (int n = 0; n < 200; n++) begin
      logic [7:0] pa, pb;
      pa = 8'($urandom); pb = 8'($urandom);
      operand_a = pa; operand_b = pb;
      @(posedge clk); #1;  // operands captured
      @(posedge clk); #1;  // product of pa*pb in z (operands unchanged)
      check(z == expect_product(pa, pb) && end_flag == 1'b0, "streaming");
    end

    // Clear while a valid product is held.
    load = 1'b0;
    @(posedge clk); #1;
    check(end_flag == 1'b1, "flag before clear");
    clr = 1'b1;
    @(posedge clk); #1;
    check(z == 16'h0 && end_flag == 1'b0, "clear of valid result");
    clr = 1'b0;
    @(posedge clk); #1;
    check(z == 16'h0, "operands cleared");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
