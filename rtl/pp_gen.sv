// pp_gen - partial-product generator: an N x N array of GDI AND gates.
//
// pp[r][c] = b[r] & a[c] has weight 2^(r+c). For the 8x8 multiplier this is
// the array of 64 AND gates. Row r is the multiplicand a gated by multiplier
// bit b[r]. Combinational; a, b in (N bits each), pp out (N rows of N bits).
module pp_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,        // multiplicand
  input  logic [N-1:0] b,        // multiplier
  output logic [N-1:0] pp [N]    // pp[r][c] = b[r] & a[c]
);
  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      gdi_and u_and (.a(b[r]), .b(a[c]), .y(pp[r][c]));
    end
  end
endmodule
