// compressor_4_2 - "4:2" compressor (listed as 4:3 in the cost table):
// five bits of one weight in, three bits out.
//
// Inputs i1..i4 come from bit position j and cin from the neighbouring
// position (in the multiplier tree all five are simply bits of column j).
// Two GDI full adders and one GDI half adder count them:
//   fa0: i1 + i2 + i3        -> s0, c0
//   fa1: s0 + i4 + cin       -> sum, c1
//   ha : c0 + c1             -> carry, cout
// so that i1+i2+i3+i4+cin = sum + 2*carry + 4*cout. sum stays at weight j,
// carry goes to j+1 and cout to j+2. The count is exact, so the outputs never
// overflow. Combinational; no clock.
module compressor_4_2 (
  input  logic i1,
  input  logic i2,
  input  logic i3,
  input  logic i4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s0, c0, c1;

  gdi_full_adder u_fa0 (.a(i1), .b(i2), .cin(i3),  .sum(s0),  .carry(c0));
  gdi_full_adder u_fa1 (.a(s0), .b(i4), .cin(cin), .sum(sum), .carry(c1));
  gdi_half_adder u_ha  (.a(c0), .b(c1), .sum(carry), .carry(cout));
endmodule
