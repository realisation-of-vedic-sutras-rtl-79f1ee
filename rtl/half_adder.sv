// half_adder: one-bit half adder, sum = a ^ b and carry = a & b.
// Combinational. Used by the 2x2 Urdhva Tiryagbhyam multiplier, which the
// design builds from four AND gates and two of these.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end
endmodule
