// tb_adaptive_vedic_multiplier: end-to-end test of the adaptive 8x8 Vedic
// multiplier at its only size.
//
// First the four operand pairs of the reference simulation are applied,
// each with the product and the sutra it must invoke:
//   170 *  99 = 16830  Ekanyunena Purvena
//   153 * 157 = 24021  Antyayor Dasakepi
//   107 * 109 = 11663  Anurupyena
//   124 * 159 = 19716  Urdhva Tiryagbhyam
// Then all 65536 operand pairs are applied; each product is compared with
// the simulator's multiplication and each sutra choice with a reference
// written from the selection rules. The test counts how often each sutra
// was used and how often the Anurupyena unit took its negative cross
// difference path (both operands single digits); a mechanism that never
// happened counts as a failure.
module tb_adaptive_vedic_multiplier;
  import vedic_pkg::*;
  int checks = 0, failures = 0;
  int uses [4];
  int negative_cross = 0;

  operand_t x, y;
  product_t p;
  sutra_e   sutra;

  adaptive_vedic_multiplier dut (.multiplicand(x), .multiplier(y), .product(p), .sutra(sutra));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sutra_e expected(int unsigned a, int unsigned b);
    if (b == 9 || b == 99)                          return SUTRA_EKANYUNA;
    if (a / 10 == b / 10 && a % 10 + b % 10 == 10) return SUTRA_ANTYAYOR;
    if (a / 10 == b / 10)                           return SUTRA_ANURUPYA;
    return SUTRA_URDHVA;
  endfunction

  task automatic apply(int unsigned a, int unsigned b, int unsigned want_p, sutra_e want_s);
    x = operand_t'(a);
    y = operand_t'(b);
    #1;
    checks++;
    if (32'(p) != want_p) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d gave %0d, expected %0d", a, b, p, want_p);
    end
    checks++;
    if (sutra != want_s) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d used sutra %0d, expected %0d", a, b, sutra, want_s);
    end
    uses[sutra]++;
    if (sutra == SUTRA_ANURUPYA && a < 10 && b < 10 && a + b < 10) negative_cross++;
  endtask

  initial begin
    apply(170,  99, 16830, SUTRA_EKANYUNA);
    apply(153, 157, 24021, SUTRA_ANTYAYOR);
    apply(107, 109, 11663, SUTRA_ANURUPYA);
    apply(124, 159, 19716, SUTRA_URDHVA);
    for (int unsigned a = 0; a < 256; a++)
      for (int unsigned b = 0; b < 256; b++)
        apply(a, b, a * b, expected(a, b));

    $display("sutra uses: urdhva=%0d ekanyunena=%0d anurupyena=%0d antyayor=%0d",
             uses[SUTRA_URDHVA], uses[SUTRA_EKANYUNA], uses[SUTRA_ANURUPYA], uses[SUTRA_ANTYAYOR]);
    $display("anurupyena negative cross difference: %0d", negative_cross);
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (uses[s] == 0) begin
        failures++;
        $display("FAIL sutra %0d never selected", s);
      end
    end
    checks++;
    if (negative_cross == 0) begin
      failures++;
      $display("FAIL negative cross difference path never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
