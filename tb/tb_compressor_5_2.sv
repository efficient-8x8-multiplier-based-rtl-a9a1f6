// tb_compressor_5_2 - exhaustive check of the seven-input compressor: for all
// 128 input patterns, sum + 2*carry + 4*cout must equal the number of ones.
module tb_compressor_5_2;
  logic clk = 1'b0;
  int   checks   = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  // Watchdog: a run that has not finished after 400 cycles is a failure.
  initial begin : watchdog
    repeat (400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [6:0] in;
  logic       sum, carry, cout;
  compressor_5_2 dut (.i1(in[0]), .i2(in[1]), .i3(in[2]), .i4(in[3]), .i5(in[4]),
                      .cin1(in[5]), .cin2(in[6]),
                      .sum(sum), .carry(carry), .cout(cout));

  initial begin
    for (int v = 0; v < 128; v++) begin
      @(negedge clk);
      in = 7'(v);
      #1;
      checks++;
      if ({cout, carry, sum} !== 3'($countones(in))) begin
        failures++;
        $display("FAIL in=%b -> cout=%b carry=%b sum=%b", in, cout, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
