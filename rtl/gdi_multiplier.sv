// gdi_multiplier - N x N unsigned Wallace tree multiplier built from Gate
// Diffusion Input (GDI) cells; N = 8 is the design point.
//
// Three steps, all combinational:
//   1. pp_gen: N*N GDI AND gates form the partial products (64 for 8x8).
//   2. wallace_tree: 7-input (5:2) and 5-input (4:2) compressors, full and
//      half adders reduce the matrix to two rows; three stages for 8x8.
//   3. final_adder: a ripple-carry adder of GDI cells adds the two rows.
// Every arithmetic cell bottoms out in gdi_cell, the two-transistor GDI
// multiplexer, so the netlist mirrors the transistor-level structure.
//
// The three-step structure, the GDI cells, the compressor types and the
// three-stage tree follow the published design; unsigned operands, the
// per-column compressor allocation and the ripple-carry final adder are this
// implementation's choices.
//
// Interface: a (multiplicand) and b (multiplier), N bits each, unsigned;
// p = a * b, 2N bits. There is no clock and no register: the product is valid
// one combinational delay after the operands change.
module gdi_multiplier #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  logic [N-1:0]   pp [N];
  logic [2*N-1:0] row_a, row_b;
  logic           unused_cout;  // always 0: the product fits in 2N bits

  pp_gen       #(.N(N))   u_pp    (.a(a), .b(b), .pp(pp));
  wallace_tree #(.N(N))   u_tree  (.pp(pp), .row_a(row_a), .row_b(row_b));
  final_adder  #(.W(2*N)) u_final (.x(row_a), .y(row_b), .s(p), .cout(unused_cout));
endmodule
