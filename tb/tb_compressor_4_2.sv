// tb_compressor_4_2 - exhaustive check of the five-input compressor: for all
// 32 input patterns, sum + 2*carry + 4*cout must equal the number of ones.
module tb_compressor_4_2;
  logic clk = 1'b0;
  int   checks   = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  // Watchdog: a run that has not finished after 200 cycles is a failure.
  initial begin : watchdog
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [4:0] in;
  logic       sum, carry, cout;
  compressor_4_2 dut (.i1(in[0]), .i2(in[1]), .i3(in[2]), .i4(in[3]), .cin(in[4]),
                      .sum(sum), .carry(carry), .cout(cout));

  initial begin
    for (int v = 0; v < 32; v++) begin
      @(negedge clk);
      in = 5'(v);
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
