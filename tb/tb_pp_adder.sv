// tb_pp_adder: self-checking testbench for the partial product adder.
//
// Drives random partial products (random bits everywhere, including the bits
// above each partial product's width, which must be ignored) plus corner
// patterns of all ones and all zeros, and compares the product with
// sum(pp_i[15-2i:0] << 2i) mod 2**16 computed here.
module tb_pp_adder;
  logic [3:0][15:0] pp;
  logic [15:0]      product;
  int checks = 0, failures = 0;

  pp_adder #(.WIDTH(8)) dut (.pp(pp), .product(product));

  function automatic logic [15:0] expect_sum(logic [3:0][15:0] p);
    logic [15:0] s;
    s = '0;
    for (int i = 0; i < 4; i++) begin
      logic [15:0] m;
      m = p[i] & (16'hFFFF >> (2 * i));
      s += m << (2 * i);
    end
    return s;
  endfunction

  task automatic apply(input logic [3:0][15:0] p);
    pp = p;
    #1;
    checks++;
    if (product !== expect_sum(p)) begin
      failures++;
      if (failures < 10) $display("FAIL pp=%h product=%h expected=%h", p, product, expect_sum(p));
    end
  endtask

  initial begin
    apply('0);
    apply({4{16'hFFFF}});
    apply({16'h0, 16'h0, 16'h0, 16'hFFFF});
    apply({16'h0003, 16'h0, 16'h0, 16'hFFFF});
    for (int n = 0; n < 20000; n++) begin
      apply({16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom)});
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
