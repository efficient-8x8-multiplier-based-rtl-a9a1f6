// tb_gdi_half_adder - exhaustive check: {carry, sum} must equal a + b.
module tb_gdi_half_adder;
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

  logic a, b, sum, carry;
  gdi_half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin
    for (int v = 0; v < 4; v++) begin
      @(negedge clk);
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({carry, sum} !== 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%b b=%b -> carry=%b sum=%b", a, b, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
