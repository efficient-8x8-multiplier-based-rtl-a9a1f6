// gdi_and - two-input AND built from one GDI cell.
//
// The cell is configured as G = a, P = '0', N = b: with a low the PMOS
// passes the constant 0, with a high the NMOS passes b, so y = a & b.
// This is the partial-product gate of the multiplier (one per bit pair).
// Combinational; a, b in, y out.
module gdi_and (
  input  logic a,
  input  logic b,
  output logic y
);
  gdi_cell u_cell (.g(a), .p(1'b0), .n(b), .y(y));
endmodule
