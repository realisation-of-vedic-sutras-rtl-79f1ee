// control_unit: decides which sutra multiplies the operands and forwards
// the operands to that unit only.
//
// Rules, checked in this order:
//   1. the multiplier is all nines (9 or 99)          -> Ekanyunena Purvena
//   2. same leading decimal part, last digits sum 10   -> Antyayor Dasakepi
//   3. same leading decimal part                       -> Anurupyena
//   4. otherwise                                       -> Urdhva Tiryagbhyam
// The four conditions are the design's. Rule 2 is a special case of rule 3,
// so it is tested first; the order of the rules is this implementation's
// reading, chosen so that 153*157 goes to Antyayor Dasakepi and 107*109 to
// Anurupyena, as the design expects. Decimal digits come from the reciprocal
// divide-by-ten in vedic_pkg.
//
// Interface: multiplicand, multiplier in; sutra (which unit is selected)
// and one operand pair per unit out. The selected unit's pair carries the
// operands; every other pair is held at zero, so the idle units do not
// switch. Combinational.
module control_unit
  import vedic_pkg::*;
(
  input  operand_t  multiplicand,
  input  operand_t  multiplier,
  output sutra_e    sutra,
  output operands_t to_urdhva,
  output operands_t to_ekanyunena,
  output operands_t to_anurupyena,
  output operands_t to_antyayor
);
  decimal_t  x_dec, y_dec;
  logic      all_nines, same_lead, digits_ten;
  operands_t ops;

  always_comb begin
    x_dec      = split_decimal(multiplicand);
    y_dec      = split_decimal(multiplier);
    all_nines  = (multiplier == 8'd9) || (multiplier == 8'd99);
    same_lead  = (x_dec.lead == y_dec.lead);
    digits_ten = (5'(x_dec.digit) + 5'(y_dec.digit) == 5'd10);

    if (all_nines)                    sutra = SUTRA_EKANYUNA;
    else if (same_lead && digits_ten) sutra = SUTRA_ANTYAYOR;
    else if (same_lead)               sutra = SUTRA_ANURUPYA;
    else                              sutra = SUTRA_URDHVA;

    ops.multiplicand = multiplicand;
    ops.multiplier   = multiplier;
    to_urdhva        = (sutra == SUTRA_URDHVA)   ? ops : '0;
    to_ekanyunena    = (sutra == SUTRA_EKANYUNA) ? ops : '0;
    to_anurupyena    = (sutra == SUTRA_ANURUPYA) ? ops : '0;
    to_antyayor      = (sutra == SUTRA_ANTYAYOR) ? ops : '0;
  end
endmodule
