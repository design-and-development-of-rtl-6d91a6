// tb_booth_8_pipelined: self-checking testbench for the pipelined Booth
// multiplier.
//
// Every pair of signed 8-bit operands is loaded with a one-cycle load pulse;
// the product (computed here with the simulator's signed multiply) must appear
// on z two rising edges after the load edge, with end_flag high, and not
// before. A second part holds load high and feeds a new operand pair every
// cycle: each product must come out two cycles later with end_flag low. Clear
// is checked at the start and end. A watchdog ends a hung run.
module tb_booth_8_pipelined;
  logic        clk = 1'b0;
  logic        clr, load;
  logic [7:0]  operand_a, operand_b;
  logic        end_flag;
  logic [15:0] z;
  int          checks = 0, failures = 0;

  booth_8_pipelined dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: z=%0d end_flag=%0b", what, $signed(z), end_flag);
    end
  endtask

  function automatic logic [15:0] expect_product(logic [7:0] a, logic [7:0] b);
    return 16'($signed(a) * $signed(b));
  endfunction

  logic [15:0] expq[$];

  initial begin
    clr = 1'b1; load = 1'b0; operand_a = '0; operand_b = '0;
    repeat (3) @(posedge clk);
    #1 check(z == 16'h0 && end_flag == 1'b0, "clear");
    clr = 1'b0;

    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        logic [15:0] e;
        e = expect_product(8'(ia), 8'(ib));
        operand_a = 8'(ia); operand_b = 8'(ib); load = 1'b1;
        @(posedge clk); #1;            // operands captured
        load = 1'b0;
        operand_a = 8'($urandom); operand_b = 8'($urandom);
        @(posedge clk); #1;            // partial products stored
        check(end_flag == 1'b0, "no flag one cycle after load");
        if (e != 16'h0) check(z != e || z == 16'h0, "not early");
        @(posedge clk); #1;            // product out
        check(end_flag == 1'b1 && z == e, "product after two cycles");
      end
    end

    // Streaming: new operands every cycle with load high.
    load = 1'b1;
    for (int n = 0; n < 300; n++) begin
      logic [7:0] pa, pb;
      pa = 8'($urandom); pb = 8'($urandom);
      operand_a = pa; operand_b = pb;
      expq.push_back(expect_product(pa, pb));
      @(posedge clk); #1;
      if (n >= 2) begin
        check(z == expq.pop_front() && end_flag == 1'b0, "streaming");
      end
    end

    clr = 1'b1;
    @(posedge clk); #1;
    check(z == 16'h0 && end_flag == 1'b0, "clear at end");

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
