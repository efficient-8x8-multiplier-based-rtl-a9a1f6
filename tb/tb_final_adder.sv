// tb_final_adder - checks the 16-bit ripple-carry final adder against the
// integer sum of its operands: corner cases (full carry ripple, all ones,
// carry out of the top bit) and 20000 random pairs, one per cycle.
module tb_final_adder;
  localparam int W = 16;
  logic clk = 1'b0;
  int   checks   = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  // Watchdog: a run that has not finished after 30000 cycles is a failure.
  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] x, y, s;
  logic         cout;
  final_adder #(.W(W)) dut (.x(x), .y(y), .s(s), .cout(cout));

  task automatic apply(input logic [W-1:0] xv, input logic [W-1:0] yv);
    logic [W:0] exp;
    @(negedge clk);
    x = xv;
    y = yv;
    exp = {1'b0, xv} + {1'b0, yv};
    #1;
    checks++;
    if ({cout, s} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h = %b_%h expected %h", xv, yv, cout, s, exp);
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, 16'd1);
    apply('1, '1);
    apply(16'h7fff, 16'h0001);
    apply(16'h5555, 16'haaaa);
    for (int i = 0; i < 20000; i++) apply(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
