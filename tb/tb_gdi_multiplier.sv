// tb_gdi_multiplier - end-to-end test of the 8x8 multiplier at its default
// size: all 65536 operand pairs, one per clock cycle, each product compared
// with the integer product of the operands.
//
// It also counts how often each mechanism of the compressor tree is really
// exercised, and fails if one never is:
//   * the 7-input compressor of the 8-bit middle column reaching its top
//     output (cout, weight 4), and the eighth bit promoted past it,
//   * a full 5-input compressor and a 4-input one (fifth input tied low)
//     reaching cout,
//   * a tree half adder producing a carry,
//   * the final adder rippling a carry across 8 or more bit positions,
//   * a product using the top output bit.
module tb_gdi_multiplier;
  logic clk = 1'b0;
  int   checks   = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  // Watchdog: a run that has not finished after 70000 cycles is a failure.
  initial begin : watchdog
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0]  a, b;
  logic [15:0] p;

  gdi_multiplier dut (.a(a), .b(b), .p(p));

  int n_c73_cout = 0, n_promoted = 0, n_c53_cout = 0, n_c53x4_cout = 0;
  int n_ha_carry = 0, n_long_ripple = 0, n_top_bit = 0;

  // longest run of positions through which a carry travels in row_a + row_b
  function automatic int longest_ripple(logic [15:0] x, logic [15:0] y);
    int run = 0, best = 0;
    logic c = 1'b0;
    for (int i = 0; i < 16; i++) begin
      logic c_next;
      c_next = (x[i] & y[i]) | (c & (x[i] ^ y[i]));
      if (c_next) run++; else run = 0;
      if (run > best) best = run;
      c = c_next;
    end
    return best;
  endfunction

  task automatic count_and_check(int required, int seen, string what);
    checks++;
    $display("%-45s %0d", what, seen);
    if (seen < required) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    for (int v = 0; v < 65536; v++) begin
      logic [15:0] exp;
      @(negedge clk);
      {a, b} = 16'(v);
      exp = 16'(int'(a) * int'(b));
      #1;
      checks++;
      if (p !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d = %0d expected %0d", a, b, p, exp);
      end
      if (dut.u_tree.g_stage[0].g_col[7].g_c73[0].cout) n_c73_cout++;
      if (dut.u_tree.g_lvl[1].bits[7][0])               n_promoted++;
      if (dut.u_tree.g_stage[0].g_col[4].g_c53.cout)    n_c53_cout++;
      if (dut.u_tree.g_stage[1].g_col[5].g_c53.cout)    n_c53x4_cout++;
      if (dut.u_tree.g_stage[0].g_col[13].g_ha.carry)   n_ha_carry++;
      if (longest_ripple(dut.row_a, dut.row_b) >= 8)    n_long_ripple++;
      if (p[15])                                        n_top_bit++;
    end
    count_and_check(1, n_c73_cout,    "7-input compressor cout (middle column)");
    count_and_check(1, n_promoted,    "promoted eighth bit of middle column = 1");
    count_and_check(1, n_c53_cout,    "5-input compressor cout");
    count_and_check(1, n_c53x4_cout,  "4-input use of 5-input compressor cout");
    count_and_check(1, n_ha_carry,    "tree half adder carry");
    count_and_check(1, n_long_ripple, "final adder carry ripple >= 8 bits");
    count_and_check(1, n_top_bit,     "product bit 15 set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
