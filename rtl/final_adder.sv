// final_adder - adds the two rows left by the Wallace tree.
//
// A ripple-carry adder of GDI cells: a half adder in bit 0 (there is no
// carry in) and GDI full adders in bits 1..W-1. The choice of a ripple-carry
// structure is this design's own; any two-operand adder would do here.
// cout is the carry out of the top bit; in the multiplier it is always 0
// because an N x N product fits in 2N bits. Combinational.
module final_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:1] c;  // c[i] is the carry into bit i

  gdi_half_adder u_ha0 (.a(x[0]), .b(y[0]), .sum(s[0]), .carry(c[1]));
  for (genvar i = 1; i < W; i++) begin : g_bit
    gdi_full_adder u_fa (.a(x[i]), .b(y[i]), .cin(c[i]), .sum(s[i]), .carry(c[i+1]));
  end
  assign cout = c[W];
endmodule
