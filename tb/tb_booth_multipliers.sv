// tb_booth_multipliers: end-to-end testbench of the whole design at its
// default size.
//
// Drives the four multipliers of the top at once:
// - booth_8 and booth_8_pipelined get the same operand stream: the extreme
//   signed values (-128, 127, 0, -1, 1 in every combination) first, then random
//   pairs. Each pair is loaded with a one-cycle load pulse, and the product must
//   appear after one cycle (booth_8) and two cycles (pipelined) with end_flag
//   high. Bursts with load held high check that products still follow with
//   end_flag low, and a clear in the middle checks that every register and
//   flag clears.
// - fourbit_multi and ebm get random unsigned pairs every cycle.
// Expected values come from the simulator's own multiply.
//
// It also counts how often each mechanism happened: every Booth digit value
// (-2, -1, 0, +1, +2) in booth_8's units, a carry-select block taking its
// carry-in-1 sum, a load pulse, load held high, a clear, and end_flag rising.
// A mechanism that never happened counts as a failure.
module tb_booth_multipliers;
  import booth8_pkg::*;

  logic        clk = 1'b0;
  logic        b8_clr, b8_load, b8_end_flag;
  logic [7:0]  b8_operand_a, b8_operand_b;
  logic [15:0] b8_z;
  logic        b8p_clr, b8p_load, b8p_end_flag;
  logic [7:0]  b8p_operand_a, b8p_operand_b;
  logic [15:0] b8p_z;
  logic [3:0]  b4_a, b4_b;
  logic [7:0]  b4_c;
  logic [7:0]  ebm_a, ebm_b;
  logic [15:0] ebm_q;

  int checks = 0, failures = 0;
  int n_digit[5];
  int n_select1 = 0, n_load_pulse = 0, n_load_held = 0, n_clear = 0, n_flag_rise = 0;
  int n_extreme = 0;

  booth_multipliers dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [15:0] sprod(logic [7:0] a, logic [7:0] b);
    return 16'($signed(a) * $signed(b));
  endfunction

  // Mechanism counters, sampled on every rising edge.
  logic b8_flag_d = 1'b0;
  always @(posedge clk) begin
    for (int i = 0; i < 4; i++) n_digit[int'(dut.u_booth_8.digit[i])]++;
    if (dut.u_booth_8.u_adder.g_stage[1].u_csa.carry[1]) n_select1++;
    if (b8_end_flag && !b8_flag_d) n_flag_rise++;
    b8_flag_d <= b8_end_flag;
  end

  // Array multipliers: a new random pair every cycle.
  always @(negedge clk) begin
    b4_a = 4'($urandom); b4_b = 4'($urandom);
    ebm_a = 8'($urandom); ebm_b = 8'($urandom);
    #1;
    check(b4_c == 8'(int'(b4_a) * int'(b4_b)), "fourbit_multi");
    check(ebm_q == 16'(int'(ebm_a) * int'(ebm_b)), "ebm");
  end

  // One load pulse on both Booth multipliers, then check both results.
  task automatic pulse(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] e;
    e = sprod(a, b);
    b8_operand_a = a;  b8_operand_b = b;  b8_load = 1'b1;
    b8p_operand_a = a; b8p_operand_b = b; b8p_load = 1'b1;
    @(posedge clk); #1;
    n_load_pulse++;
    b8_load = 1'b0; b8p_load = 1'b0;
    b8_operand_a = 8'($urandom); b8p_operand_a = 8'($urandom);
    @(posedge clk); #1;
    check(b8_z == e && b8_end_flag, "booth_8 product");
    check(!b8p_end_flag, "pipelined flag not yet");
    @(posedge clk); #1;
    check(b8p_z == e && b8p_end_flag, "pipelined product");
    check(b8_z == e && b8_end_flag, "booth_8 holds");
  endtask

  // Load held high for n cycles with new operands each cycle.
  task automatic burst(input int n);
    logic [15:0] e8[$], ep[$];
    b8_load = 1'b1; b8p_load = 1'b1;
    for (int k = 0; k < n; k++) begin
      logic [7:0] a, b;
      a = 8'($urandom); b = 8'($urandom);
      b8_operand_a = a;  b8_operand_b = b;
      b8p_operand_a = a; b8p_operand_b = b;
      e8.push_back(sprod(a, b)); ep.push_back(sprod(a, b));
      @(posedge clk); #1;
      n_load_held++;
      if (k >= 1) check(b8_z == e8.pop_front() && !b8_end_flag, "booth_8 burst");
      if (k >= 2) check(b8p_z == ep.pop_front() && !b8p_end_flag, "pipelined burst");
    end
    b8_load = 1'b0; b8p_load = 1'b0;
    @(posedge clk); #1;
    check(b8_z == e8.pop_front() && b8_end_flag, "booth_8 burst end");
    check(b8p_z == ep.pop_front(), "pipelined burst end-1");
    @(posedge clk); #1;
    check(b8p_z == ep.pop_front() && b8p_end_flag, "pipelined burst end");
  endtask

  localparam logic [7:0] EXTREMES[5] = '{8'h80, 8'h7F, 8'h00, 8'hFF, 8'h01};

  initial begin
    foreach (n_digit[i]) n_digit[i] = 0;
    b8_clr = 1'b1; b8p_clr = 1'b1; b8_load = 1'b0; b8p_load = 1'b0;
    b8_operand_a = '0; b8_operand_b = '0; b8p_operand_a = '0; b8p_operand_b = '0;
    repeat (3) @(posedge clk);
    #1 check(b8_z == 0 && !b8_end_flag && b8p_z == 0 && !b8p_end_flag, "reset");
    n_clear++;
    b8_clr = 1'b0; b8p_clr = 1'b0;

    // Smallest, largest and zero operands.
    foreach (EXTREMES[i]) foreach (EXTREMES[j]) begin
      pulse(EXTREMES[i], EXTREMES[j]);
      n_extreme++;
    end

    for (int n = 0; n < 2000; n++) begin
      pulse(8'($urandom), 8'($urandom));
      if (n % 500 == 250) burst(20);
      if (n == 1000) begin
        b8_clr = 1'b1; b8p_clr = 1'b1;
        @(posedge clk); #1;
        check(b8_z == 0 && !b8_end_flag && b8p_z == 0 && !b8p_end_flag, "clear");
        n_clear++;
        b8_clr = 1'b0; b8p_clr = 1'b0;
      end
    end

    $display("mechanisms: digit0=%0d +1=%0d +2=%0d -1=%0d -2=%0d select1=%0d pulses=%0d held=%0d clears=%0d flag_rises=%0d extremes=%0d",
             n_digit[DIGIT_ZERO], n_digit[DIGIT_P1], n_digit[DIGIT_P2], n_digit[DIGIT_M1],
             n_digit[DIGIT_M2], n_select1, n_load_pulse, n_load_held, n_clear, n_flag_rise,
             n_extreme);
    foreach (n_digit[i]) check(n_digit[i] > 0, "digit value seen");
    check(n_select1 > 0, "carry-select carry-in-1 path used");
    check(n_load_pulse > 0, "load pulse");
    check(n_load_held > 0, "load held");
    check(n_clear > 1, "clear");
    check(n_flag_rise > 0, "end_flag rise");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
