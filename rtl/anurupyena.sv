// anurupyena: product of two numbers with the same leading decimal part
// (for example 43 and 46, or 107 and 109), by working from a common base.
//
// Base selection: the working base W is the next multiple of ten above the
// multiplicand, W = 10*(lead+1) (43 -> 50, 107 -> 110). Both operands then
// lie 1..10 below W. With deviations dx = W - x and dy = W - y:
//     x * y = W * (x - dy) + dx * dy
// The subtractor forms dx, dy and the cross_diff difference s = x - dy; the
// deviations are multiplied in a 4x4 Urdhva Tiryagbhyam unit; the scaling of
// s by W ("shifting the subtracted bits") is a multiplication by (lead+1)
// in an 8x8 Urdhva Tiryagbhyam unit followed by a x10 shift-and-add; a final
// adder joins the two parts. Example: 107*109 = 110*106 + 3*1 = 11663.
//
// The base rule (next multiple of ten) and the identity follow the design;
// how W scales s in binary is this implementation's choice. When both
// operands are single digits s can be negative (3*4 = 10*(-3) + 7*6); the
// unit then subtracts W*|s| from dx*dy.
//
// Interface: multiplicand, multiplier (8-bit unsigned) in; product (16-bit)
// out. Combinational. Correct whenever both operands have the same leading
// part floor(x/10); the control unit sends only such operands here.
module anurupyena
  import vedic_pkg::*;
(
  input  operand_t multiplicand,
  input  operand_t multiplier,
  output product_t product
);
  logic [4:0]         x_lead;       // leading decimal part of the multiplicand
  logic [4:0]         lead_plus1;   // W / 10
  logic [8:0]         base;         // W, up to 260
  logic [3:0]         dx, dy;       // deviations below the base, 1..10
  logic signed [9:0]  cross_diff;        // s = x - dy
  logic               cross_neg;
  logic [7:0]         cross_mag;
  logic [15:0]        scaled_lead;  // (lead+1) * |s|
  logic [19:0]        scaled_base;  // W * |s|
  logic [7:0]         dev_prod;     // dx * dy

  always_comb begin
    x_lead     = split_decimal(multiplicand).lead;
    lead_plus1 = x_lead + 5'd1;
    base       = {lead_plus1, 3'b000} + {3'b000, lead_plus1, 1'b0};
    dx         = 4'(base - {1'b0, multiplicand});
    dy         = 4'(base - {1'b0, multiplier});
    cross_diff      = $signed({2'b00, multiplicand}) - $signed({6'b000000, dy});
    cross_neg  = cross_diff[9];
    cross_mag  = cross_neg ? 8'(-cross_diff) : cross_diff[7:0];
  end

  urdhva_8x8 u_scale (
    .a({3'b000, lead_plus1}),
    .b(cross_mag),
    .p(scaled_lead)
  );

  urdhva_4x4 u_deviation (
    .a(dx),
    .b(dy),
    .p(dev_prod)
  );

  always_comb begin
    scaled_base = times10(scaled_lead);
    if (cross_neg) product = PRODUCT_W'({8'd0, dev_prod} - scaled_base[15:0]);
    else           product = PRODUCT_W'(scaled_base + 20'(dev_prod));
  end
endmodule
