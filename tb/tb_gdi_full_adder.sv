// tb_gdi_full_adder - exhaustive check: {carry, sum} must equal a + b + cin.
module tb_gdi_full_adder;
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

  logic a, b, cin, sum, carry;
  gdi_full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .carry(carry));

  initial begin
    for (int v = 0; v < 8; v++) begin
      @(negedge clk);
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if ({carry, sum} !== 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b -> carry=%b sum=%b", a, b, cin, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
