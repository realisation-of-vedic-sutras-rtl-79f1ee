// urdhva_8x8: 8x8-bit Urdhva Tiryagbhyam multiplier built from four
// 4x4 multipliers (urdhva_4x4), three 8-bit ripple carry adders and one OR gate,
// the recursive structure the design uses at every size.
//
// Each operand is split into a high and a low half. The four 4x4 units
// form the half products q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH.
//   adder 1: t1 = q1 + q2                      (the crosswise terms, carry c1)
//   adder 2: t2 = t1 + upper half of q0        (carry c2)
//   adder 3: t3 = q3 + {c1 | c2, upper half of t2}
// p = {t3, lower half of t2, lower half of q0}. The two crosswise carries
// have the same weight and can never both be set (q1 + q2 + (2^4-1)
// < 2^(8+1)), so one OR gate merges them. The carry out of adder 3 is
// always zero because an 8x8 product fits in 16 bits; it is left unused.
//
// Interface: a, b (8-bit unsigned) in; p (16-bit) out. Combinational.
module urdhva_8x8 (
  input  logic [7:0]   a,
  input  logic [7:0]   b,
  output logic [15:0] p
);
  localparam int unsigned N = 8;
  localparam int unsigned H = N / 2;

  logic [N-1:0] q0, q1, q2, q3;
  logic [N-1:0] t1, t2, t3;
  logic         c1, c2, c3_unused;
  logic         cross_carry;

  urdhva_4x4 u_ll (.a(a[H-1:0]), .b(b[H-1:0]), .p(q0));
  urdhva_4x4 u_hl (.a(a[N-1:H]), .b(b[H-1:0]), .p(q1));
  urdhva_4x4 u_lh (.a(a[H-1:0]), .b(b[N-1:H]), .p(q2));
  urdhva_4x4 u_hh (.a(a[N-1:H]), .b(b[N-1:H]), .p(q3));

  ripple_carry_adder #(.WIDTH(N)) u_add_cross (
    .a(q1), .b(q2), .cin(1'b0), .sum(t1), .cout(c1)
  );

  ripple_carry_adder #(.WIDTH(N)) u_add_low (
    .a(t1), .b({{H{1'b0}}, q0[N-1:H]}), .cin(1'b0), .sum(t2), .cout(c2)
  );

  assign cross_carry = c1 | c2;

  ripple_carry_adder #(.WIDTH(N)) u_add_high (
    .a(q3), .b({{(H-1){1'b0}}, cross_carry, t2[N-1:H]}), .cin(1'b0),
    .sum(t3), .cout(c3_unused)
  );

  assign p = {t3, t2[H-1:0], q0[H-1:0]};
endmodule
