// tb_gdi_and - exhaustive check of the GDI AND gate, one vector per cycle.
module tb_gdi_and;
  logic clk = 1'b0;
  int   checks   = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  // Watchdog: a run that has not finished after 100 cycles is a failure.
  initial begin : watchdog
    repeat (100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic a, b, y;
  gdi_and dut (.a(a), .b(b), .y(y));

  initial begin
    for (int v = 0; v < 4; v++) begin
      @(negedge clk);
      {a, b} = 2'(v);
      #1;
      checks++;
      if (y !== (v == 3)) begin
        failures++;
        $display("FAIL a=%b b=%b y=%b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
