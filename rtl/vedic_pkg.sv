// vedic_pkg: types and small arithmetic helpers shared by the adaptive
// Vedic multiplier.
//
// The multiplier works on 8-bit unsigned operands and gives a 16-bit
// product. Three of its four sutras reason about the operands as decimal
// numbers (a leading part and a last digit), so this package provides a
// binary-to-decimal split of an 8-bit value and multiplication by the
// decimal bases 10 and 100 as shift-and-add networks. All helpers are pure
// combinational functions.
//
// Decimal split: the leading part is floor(x/10), computed as
// (x * 205) >> 11, which equals floor(x/10) for every x in 0..1028 and so for
// every 8-bit operand; the last digit is x - 10*floor(x/10). This
// reciprocal form is a choice of this implementation.
package vedic_pkg;

  localparam int unsigned OPERAND_W = 8;               // 8x8 multiplier
  localparam int unsigned PRODUCT_W = 2 * OPERAND_W;   // 16-bit product

  typedef logic [OPERAND_W-1:0] operand_t;
  typedef logic [PRODUCT_W-1:0] product_t;

  // Which sutra unit computes the product.
  typedef enum logic [1:0] {
    SUTRA_URDHVA    = 2'd0,  // Urdhva Tiryagbhyam: general case
    SUTRA_EKANYUNA  = 2'd1,  // Ekanyunena Purvena: multiplier is 9 or 99
    SUTRA_ANURUPYA  = 2'd2,  // Anurupyena: same leading digits
    SUTRA_ANTYAYOR  = 2'd3   // Antyayor Dasakepi: same leading digits, last digits sum to 10
  } sutra_e;

  // The two operands as they are handed from the control unit to a sutra unit.
  typedef struct packed {
    operand_t multiplicand;
    operand_t multiplier;
  } operands_t;

  // An 8-bit value split into its leading decimal part and last digit.
  typedef struct packed {
    logic [4:0] lead;   // floor(x/10), 0..25
    logic [3:0] digit;  // x mod 10, 0..9
  } decimal_t;

  function automatic decimal_t split_decimal(operand_t x);
    logic [7:0] tens_times10;
    decimal_t   d;
    d.lead       = 5'((16'(x) * 16'd205) >> 11);   // 255*205 < 2^16
    tens_times10 = {d.lead, 3'b000} + {2'b00, d.lead, 1'b0};
    d.digit      = 4'(x - tens_times10);
    return d;
  endfunction

  // x * 10 = (x << 3) + (x << 1)
  function automatic logic [19:0] times10(logic [15:0] x);
    return {1'b0, x, 3'b000} + {3'b000, x, 1'b0};
  endfunction

  // x * 100 = (x << 6) + (x << 5) + (x << 2)
  function automatic logic [22:0] times100(logic [15:0] x);
    return {1'b0, x, 6'b0} + {2'b0, x, 5'b0} + {5'b0, x, 2'b0};
  endfunction

endpackage
