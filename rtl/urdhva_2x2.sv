// urdhva_2x2: 2x2-bit Urdhva Tiryagbhyam ("vertically and crosswise")
// multiplier, the leaf of the 4x4 and 8x8 multipliers.
//
// Vertical step: p[0] = a0.b0. Crosswise step: a1.b0 + a0.b1 in a half
// adder gives p[1] and a carry. Vertical step: a1.b1 plus that carry in a
// second half adder gives p[2] and p[3]. Four AND gates and two half
// adders, as the design specifies. Combinational.
module urdhva_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic cross_carry;

  assign p[0] = a[0] & b[0];

  half_adder u_ha_cross (
    .a    (a[1] & b[0]),
    .b    (a[0] & b[1]),
    .sum  (p[1]),
    .carry(cross_carry)
  );

  half_adder u_ha_top (
    .a    (a[1] & b[1]),
    .b    (cross_carry),
    .sum  (p[2]),
    .carry(p[3])
  );
endmodule
