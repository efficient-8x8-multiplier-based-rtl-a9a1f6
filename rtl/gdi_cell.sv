// gdi_cell - logic function of the basic Gate Diffusion Input (GDI) cell.
//
// A GDI cell is one PMOS and one NMOS transistor sharing a gate input G.
// The PMOS source/drain is tied to input P and the NMOS source/drain to
// input N. When G is low the PMOS conducts and OUT follows P; when G is
// high the NMOS conducts and OUT follows N. Logically the cell is therefore
// a 2:1 multiplexer, OUT = G'P + GN, and choosing what drives P and N gives
// F1 (A'B), F2 (A'+B), OR, AND, MUX and NOT from this single two-transistor
// cell. This model captures the Boolean function only: the reduced voltage
// swing of a pass-transistor node, bulk biasing and timing are properties of
// the transistor implementation and are not represented.
//
// Interface: g, p, n in; y out. Purely combinational, no clock.
module gdi_cell (
  input  logic g,  // common gate of the PMOS/NMOS pair
  input  logic p,  // PMOS diffusion input, passed when g = 0
  input  logic n,  // NMOS diffusion input, passed when g = 1
  output logic y
);
  always_comb y = g ? n : p;
endmodule
