// gdi_full_adder - ten-transistor full adder from GDI cells.
//
// The adder is organised around the intermediate H = a ^ b:
//   H     : GDI XOR (inverter + multiplexer cell), 4 transistors
//   sum   : GDI multiplexer with G = H, P = cin, N = cin', i.e. H ^ cin,
//           plus the inverter that makes cin', 4 transistors
//   carry : one GDI multiplexer with G = H, P = a, N = cin, 2 transistors.
//           When a and b differ the carry equals cin; when they agree it
//           equals a (= b).
// Structure and cell count follow the GDI full adder of the design (8 + 2
// transistors). Combinational; a, b, cin in, sum, carry out.
module gdi_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic carry
);
  logic h;
  logic cin_n;

  gdi_xor  u_h     (.a(a), .b(b), .y(h));
  gdi_cell u_cinv  (.g(cin), .p(1'b1), .n(1'b0), .y(cin_n));
  gdi_cell u_sum   (.g(h), .p(cin), .n(cin_n), .y(sum));
  gdi_cell u_carry (.g(h), .p(a),   .n(cin),   .y(carry));
endmodule
