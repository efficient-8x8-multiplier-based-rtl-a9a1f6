// compressor_5_2 - "5:2" compressor (listed as 5:3 in the cost table):
// seven bits of one weight in, three bits out.
//
// Inputs i1..i5 come from bit position j, cin1 and cin2 from the neighbouring
// positions j-1 and j-2 (in the multiplier tree all seven are bits of
// column j). Four GDI full adders count them:
//   fa0: i1 + i2 + i3        -> s0, c0
//   fa1: i4 + i5 + cin1      -> s1, c1
//   fa2: s0 + s1 + cin2      -> sum, c2
//   fa3: c0 + c1 + c2        -> carry, cout
// so that the seven inputs add up to sum + 2*carry + 4*cout. The exact split
// of the inputs among the four adders is this design's choice.
// Combinational; no clock.
module compressor_5_2 (
  input  logic i1,
  input  logic i2,
  input  logic i3,
  input  logic i4,
  input  logic i5,
  input  logic cin1,
  input  logic cin2,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s0, c0, s1, c1, c2;

  gdi_full_adder u_fa0 (.a(i1), .b(i2), .cin(i3),   .sum(s0),  .carry(c0));
  gdi_full_adder u_fa1 (.a(i4), .b(i5), .cin(cin1), .sum(s1),  .carry(c1));
  gdi_full_adder u_fa2 (.a(s0), .b(s1), .cin(cin2), .sum(sum), .carry(c2));
  gdi_full_adder u_fa3 (.a(c0), .b(c1), .cin(c2),   .sum(carry), .carry(cout));
endmodule
