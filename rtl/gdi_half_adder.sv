// gdi_half_adder - half adder from GDI cells.
//
// sum   = a ^ b, from the two-cell GDI XOR (inverter + multiplexer).
// carry = a & b, from a single GDI AND cell (G = a, P = '0', N = b).
// The half adder is used inside the 4:2 compressor and in the Wallace
// tree and final adder wherever only two bits have to be combined. Its
// internal structure is this design's choice; it reuses the XOR and AND
// cells of the full adder. Combinational; a, b in, sum, carry out.
module gdi_half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  gdi_xor u_xor (.a(a), .b(b), .y(sum));
  gdi_and u_and (.a(a), .b(b), .y(carry));
endmodule
