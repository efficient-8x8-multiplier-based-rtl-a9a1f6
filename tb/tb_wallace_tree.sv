// tb_wallace_tree - checks the compressor tree on arbitrary partial-product
// matrices, not only those of a real product: row_a + row_b must equal the
// weighted sum of all matrix bits. The all-ones matrix drives every counter
// to its maximum. Three sizes are instantiated: the 8x8 design point, whose
// reduction must take three stages and handle the 8-bit middle column with
// one 7-input compressor plus one promoted bit, and 4x4 and 12x12 to exercise
// other schedules. One matrix per cycle.
module tb_wallace_tree;
  logic clk = 1'b0;
  int   checks   = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  // Watchdog: a run that has not finished after 40000 cycles is a failure.
  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0]  pp8  [8];
  logic [3:0]  pp4  [4];
  logic [11:0] pp12 [12];
  logic [15:0] ra8,  rb8;
  logic [7:0]  ra4,  rb4;
  logic [23:0] ra12, rb12;

  wallace_tree         dut   (.pp(pp8),  .row_a(ra8),  .row_b(rb8));
  wallace_tree #(.N(4))  dut4  (.pp(pp4),  .row_a(ra4),  .row_b(rb4));
  wallace_tree #(.N(12)) dut12 (.pp(pp12), .row_a(ra12), .row_b(rb12));

  function automatic longint weighted8();
    longint t = 0;
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) if (pp8[r][c]) t += longint'(1) << (r + c);
    return t;
  endfunction
  function automatic longint weighted4();
    longint t = 0;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) if (pp4[r][c]) t += longint'(1) << (r + c);
    return t;
  endfunction
  function automatic longint weighted12();
    longint t = 0;
    for (int r = 0; r < 12; r++) for (int c = 0; c < 12; c++) if (pp12[r][c]) t += longint'(1) << (r + c);
    return t;
  endfunction

  task automatic check_all();
    #1;
    checks++;
    if (longint'(ra8) + longint'(rb8) != weighted8()) begin
      failures++;
      if (failures < 10) $display("FAIL 8x8: %h + %h != %h", ra8, rb8, weighted8());
    end
    checks++;
    if (longint'(ra4) + longint'(rb4) != weighted4()) begin
      failures++;
      if (failures < 10) $display("FAIL 4x4: %h + %h != %h", ra4, rb4, weighted4());
    end
    checks++;
    if (longint'(ra12) + longint'(rb12) != weighted12()) begin
      failures++;
      if (failures < 10) $display("FAIL 12x12: %h + %h != %h", ra12, rb12, weighted12());
    end
  endtask

  initial begin
    // structure of the 8x8 tree
    checks++;
    if (dut.NSTAGES != 3) begin
      failures++;
      $display("FAIL 8x8 tree takes %0d stages, expected 3", dut.NSTAGES);
    end
    checks++;
    if (dut.PLAN[0][7].n73 != 8'd1 || dut.PLAN[0][7].pass != 8'd1) begin
      failures++;
      $display("FAIL column 7 of stage 0 is not one 7-input compressor plus one promoted bit");
    end
    $display("8x8 tree: %0d stages, %0d 7-input and %0d 5-input compressors, %0d full, %0d half adders",
             dut.NSTAGES, dut.NUM_C73, dut.NUM_C53, dut.NUM_FA, dut.NUM_HA);

    // all zeros, all ones, then random matrices with varying densities
    @(negedge clk);
    for (int r = 0; r < 12; r++) begin
      if (r < 8) pp8[r] = '0;
      if (r < 4) pp4[r] = '0;
      pp12[r] = '0;
    end
    check_all();
    @(negedge clk);
    for (int r = 0; r < 12; r++) begin
      if (r < 8) pp8[r] = '1;
      if (r < 4) pp4[r] = '1;
      pp12[r] = '1;
    end
    check_all();
    for (int i = 0; i < 30000; i++) begin
      int unsigned dens;
      dens = $urandom_range(3, 0);  // 0: sparse ... 3: dense
      @(negedge clk);
      for (int r = 0; r < 12; r++) begin
        logic [11:0] v;
        v = 12'($urandom);
        if (dens == 0) v &= 12'($urandom);
        if (dens == 3) v |= 12'($urandom);
        if (r < 8) pp8[r] = v[7:0];
        if (r < 4) pp4[r] = v[11:8];
        pp12[r] = v ^ 12'($urandom) & {12{dens[0]}};
      end
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
