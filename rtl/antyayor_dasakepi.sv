// antyayor_dasakepi: product of two numbers with the same leading decimal
// part whose last digits add up to ten (47*43, 153*157, 25*25).
//
// Writing the operands as A|B and A|C with B + C = 10:
//     A|B * A|C = (A*(A+1)) | (B*C)
// where "|" places B*C (at most 25, always two decimal digits) after the
// first part, i.e. adds it to 100 times it. An adder forms A+1, an 8x8
// Urdhva Tiryagbhyam unit forms A*(A+1), a 4x4 unit forms B*C, and a
// shift-and-add network (x*100 = x<<6 + x<<5 + x<<2) joins the two.
// Example: 153*157 = (15*16)*100 + 3*7 = 24021.
//
// The identity and the "+1 on the leading part" follow the design; the use of
// the Urdhva units for the two sub-products and the binary x100 network are
// this implementation's choices.
//
// Interface: multiplicand, multiplier (8-bit unsigned) in; product (16-bit)
// out. Combinational. Correct whenever both operands share the leading part
// and their last digits sum to ten; the control unit sends only such
// operands here.
module antyayor_dasakepi
  import vedic_pkg::*;
(
  input  operand_t multiplicand,
  input  operand_t multiplier,
  output product_t product
);
  decimal_t    x_dec;
  logic [3:0]  y_digit;      // last digit of the multiplier
  logic [4:0]  lead_plus1;
  logic [15:0] lead_prod;    // A * (A+1), up to 650
  logic [7:0]  digit_prod;   // B * C, up to 25
  logic [22:0] lead_hundreds;

  always_comb begin
    x_dec      = split_decimal(multiplicand);
    y_digit    = split_decimal(multiplier).digit;
    lead_plus1 = x_dec.lead + 5'd1;
  end

  urdhva_8x8 u_lead (
    .a({3'b000, x_dec.lead}),
    .b({3'b000, lead_plus1}),
    .p(lead_prod)
  );

  urdhva_4x4 u_digits (
    .a(x_dec.digit),
    .b(y_digit),
    .p(digit_prod)
  );

  always_comb begin
    lead_hundreds = times100(lead_prod);
    product       = PRODUCT_W'(lead_hundreds + 23'(digit_prod));
  end
endmodule
