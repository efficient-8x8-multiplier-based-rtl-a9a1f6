// tb_pp_gen - exhaustive check of the 8x8 partial-product array: for every
// pair of operands, row r must be the multiplicand when multiplier bit r is
// set and zero otherwise. One operand pair per cycle.
module tb_pp_gen;
  localparam int N = 8;
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

  logic [N-1:0] a, b;
  logic [N-1:0] pp [N];
  pp_gen #(.N(N)) dut (.a(a), .b(b), .pp(pp));

  initial begin
    for (int v = 0; v < (1 << (2 * N)); v++) begin
      @(negedge clk);
      {a, b} = (2 * N)'(v);
      #1;
      for (int r = 0; r < N; r++) begin
        logic [N-1:0] exp;
        exp = b[r] ? a : '0;
        checks++;
        if (pp[r] !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL a=%h b=%h row %0d = %h expected %h", a, b, r, pp[r], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
