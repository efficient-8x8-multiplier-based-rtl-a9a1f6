// tb_gdi_cell - exhaustive check of the GDI cell against the configurations
// of the GDI function table: each row ties P and N to a constant or a second
// input and expects F1 = A'B, F2 = A'+B, OR, AND, MUX = A'B+AC and NOT = A'.
// One vector per clock cycle.
module tb_gdi_cell;
  logic clk = 1'b0;
  int   checks   = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  // Watchdog: a run that has not finished after 1000 cycles is a failure.
  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic g, p, n, y;
  gdi_cell dut (.g(g), .p(p), .n(n), .y(y));

  task automatic check(input string what, input logic exp);
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s: g=%b p=%b n=%b y=%b expected %b", what, g, p, n, y, exp);
    end
  endtask

  initial begin
    logic A, B, C;
    for (int v = 0; v < 8; v++) begin
      {A, B, C} = 3'(v);
      @(negedge clk); g = A; p = B;    n = 1'b0; check("F1",  !A && B);
      @(negedge clk); g = A; p = 1'b1; n = B;    check("F2",  !A || B);
      @(negedge clk); g = A; p = B;    n = 1'b1; check("OR",  A || B);
      @(negedge clk); g = A; p = 1'b0; n = B;    check("AND", A && B);
      @(negedge clk); g = A; p = B;    n = C;    check("MUX", (!A && B) || (A && C));
      @(negedge clk); g = A; p = 1'b1; n = 1'b0; check("NOT", !A);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
