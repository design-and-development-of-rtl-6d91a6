// tb_booth_unit: self-checking testbench for the Booth units.
//
// Instantiates the four units of an 8-bit multiplier (INDEX 0..3) and applies
// every pair of 8-bit operands. For each unit the expected partial product is
// d * a, with the digit d = -2*b[2i+1] + b[2i] + b[2i-1] computed here as an
// integer, truncated to the unit's width of 16 - 2*i bits. The reported digit
// is checked against d as well.
module tb_booth_unit;
  import booth8_pkg::*;

  logic [7:0]  a, b;
  logic [15:0] pp0;
  logic [13:0] pp1;
  logic [11:0] pp2;
  logic [9:0]  pp3;
  booth_digit_e d0, d1, d2, d3;
  int checks = 0, failures = 0;

  booth_unit #(.WIDTH(8), .INDEX(0)) u0 (.a(a), .b(b), .digit(d0), .pp(pp0));
  booth_unit #(.WIDTH(8), .INDEX(1)) u1 (.a(a), .b(b), .digit(d1), .pp(pp1));
  booth_unit #(.WIDTH(8), .INDEX(2)) u2 (.a(a), .b(b), .digit(d2), .pp(pp2));
  booth_unit #(.WIDTH(8), .INDEX(3)) u3 (.a(a), .b(b), .digit(d3), .pp(pp3));

  function automatic int digit_value(logic [7:0] bb, int i);
    logic [8:0] bx;
    bx = {bb, 1'b0};
    return -2 * int'(bx[2*i+2]) + int'(bx[2*i+1]) + int'(bx[2*i]);
  endfunction

  function automatic int enum_value(booth_digit_e e);
    case (e)
      DIGIT_P1: return 1;
      DIGIT_P2: return 2;
      DIGIT_M1: return -1;
      DIGIT_M2: return -2;
      default:  return 0;
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%0d b=%0d", what, $signed(a), b);
    end
  endtask

  initial begin
    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        int av, e0, e1, e2, e3;
        a = 8'(ia); b = 8'(ib);
        #1;
        av = int'($signed(a));
        e0 = digit_value(b, 0) * av;
        e1 = digit_value(b, 1) * av;
        e2 = digit_value(b, 2) * av;
        e3 = digit_value(b, 3) * av;
        check(pp0 == 16'(e0), "unit 0");
        check(pp1 == 14'(e1), "unit 1");
        check(pp2 == 12'(e2), "unit 2");
        check(pp3 == 10'(e3), "unit 3");
        check(enum_value(d0) == digit_value(b, 0) && enum_value(d1) == digit_value(b, 1) &&
              enum_value(d2) == digit_value(b, 2) && enum_value(d3) == digit_value(b, 3),
              "digits");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
