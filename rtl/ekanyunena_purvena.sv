// ekanyunena_purvena: product of a multiplicand and a multiplier made only
// of nines (9 or 99, the only such values an 8-bit multiplier can take).
//
// "One less than the one before": a number of n nines is 10^n - 1, so the
// product is multiplicand * 10^n - multiplicand. The unit follows the flow
// the design gives for this sutra: a check of whether the multiplier is 9
// or 99, a base selection (10 or 100), a shifter that scales the
// multiplicand by the base, and a subtractor that removes one multiplicand.
// Scaling by a decimal base is done here with binary shift-and-add
// (x*10 = x<<3 + x<<1, x*100 = x<<6 + x<<5 + x<<2), a choice of this
// implementation.
//
// Interface: multiplicand, multiplier (8-bit unsigned) in; product (16-bit)
// out. Combinational. The result is only meaningful for a multiplier of 9
// or 99: any other multiplier is treated as 9. The control unit sends only
// such operands here.
module ekanyunena_purvena
  import vedic_pkg::*;
(
  input  operand_t multiplicand,
  input  operand_t multiplier,
  output product_t product
);
  logic        base_is_100;   // multiplier is 99, base 100; otherwise 9, base 10
  logic [22:0] shifted;       // multiplicand * base

  always_comb begin
    base_is_100 = (multiplier == 8'd99);
    if (base_is_100) shifted = times100(16'(multiplicand));
    else             shifted = 23'(times10(16'(multiplicand)));
    product = PRODUCT_W'(shifted - 23'(multiplicand));
  end
endmodule
