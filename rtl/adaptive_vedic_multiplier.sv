// adaptive_vedic_multiplier: 8x8-bit unsigned multiplier that picks, for
// each pair of operands, the Vedic sutra best suited to them.
//
// A control unit looks at the operands as decimal numbers and forwards
// them to one of four sutra units that work side by side:
//   Ekanyunena Purvena  - multiplier 9 or 99 (multiplicand*base - multiplicand)
//   Antyayor Dasakepi   - same leading part, last digits summing to ten
//   Anurupyena          - same leading part (common working base)
//   Urdhva Tiryagbhyam  - any operands (general 8x8 array of 2x2 cells)
// The selected unit's product is driven out through a 4-way multiplexer;
// the others see zero operands. The structure (control unit + four sutra
// units, the selected one giving the product) is the design's; the output
// multiplexer and the zeroing of idle units' operands are this
// implementation's reading of "the inputs are forwarded to" a unit.
//
// Interface: multiplicand, multiplier (8-bit unsigned) in; product (16-bit)
// and sutra (which unit produced it) out. Fully combinational, no clock or
// reset: the product is valid one combinational delay after the operands.
module adaptive_vedic_multiplier
  import vedic_pkg::*;
(
  input  operand_t multiplicand,
  input  operand_t multiplier,
  output product_t product,
  output sutra_e   sutra
);
  operands_t to_urdhva, to_ekanyunena, to_anurupyena, to_antyayor;
  product_t  p_urdhva, p_ekanyunena, p_anurupyena, p_antyayor;

  control_unit u_control (
    .multiplicand (multiplicand),
    .multiplier   (multiplier),
    .sutra        (sutra),
    .to_urdhva    (to_urdhva),
    .to_ekanyunena(to_ekanyunena),
    .to_anurupyena(to_anurupyena),
    .to_antyayor  (to_antyayor)
  );

  urdhva_8x8 u_urdhva (
    .a(to_urdhva.multiplicand),
    .b(to_urdhva.multiplier),
    .p(p_urdhva)
  );

  ekanyunena_purvena u_ekanyunena (
    .multiplicand(to_ekanyunena.multiplicand),
    .multiplier  (to_ekanyunena.multiplier),
    .product     (p_ekanyunena)
  );

  anurupyena u_anurupyena (
    .multiplicand(to_anurupyena.multiplicand),
    .multiplier  (to_anurupyena.multiplier),
    .product     (p_anurupyena)
  );

  antyayor_dasakepi u_antyayor (
    .multiplicand(to_antyayor.multiplicand),
    .multiplier  (to_antyayor.multiplier),
    .product     (p_antyayor)
  );

  always_comb begin
    unique case (sutra)
      SUTRA_EKANYUNA: product = p_ekanyunena;
      SUTRA_ANURUPYA: product = p_anurupyena;
      SUTRA_ANTYAYOR: product = p_antyayor;
      default:        product = p_urdhva;
    endcase
  end
endmodule
