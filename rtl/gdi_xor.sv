// gdi_xor - the "H" (XOR) function of the GDI full adder, from two GDI cells.
//
// The first cell is a GDI inverter (G = b, P = '1', N = '0') producing b'.
// The second is a GDI multiplexer with G = a, P = b, N = b', so that
// y = a'b + ab' = a ^ b. Four transistors in the transistor version.
// Combinational; a, b in, y out.
module gdi_xor (
  input  logic a,
  input  logic b,
  output logic y
);
  logic b_n;
  gdi_cell u_inv (.g(b), .p(1'b1), .n(1'b0), .y(b_n));
  gdi_cell u_mux (.g(a), .p(b),    .n(b_n),  .y(y));
endmodule
