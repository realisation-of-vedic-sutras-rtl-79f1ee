// tb_control_unit: exhaustive self-checking test of the sutra selection.
// For every pair of 8-bit operands the expected sutra is worked out with
// the simulator's own division and remainder by ten, then compared with the
// unit's choice; the operand pair must appear on the selected unit's port
// only, all other ports at zero. The four operand pairs of the reference
// simulation (170*99, 153*157, 107*109, 124*159) are checked by name too.
module tb_control_unit;
  import vedic_pkg::*;
  int checks = 0, failures = 0;

  operand_t  x, y;
  sutra_e    sutra;
  operands_t to_u, to_e, to_n, to_a;

  control_unit dut (
    .multiplicand(x), .multiplier(y), .sutra(sutra),
    .to_urdhva(to_u), .to_ekanyunena(to_e), .to_anurupyena(to_n), .to_antyayor(to_a)
  );

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

  task automatic apply(int unsigned a, int unsigned b, sutra_e want);
    operands_t ops;
    x = operand_t'(a);
    y = operand_t'(b);
    ops = '{multiplicand: x, multiplier: y};
    #1;
    checks++;
    if (sutra != want) begin
      failures++;
      if (failures < 10) $display("FAIL %0d,%0d selected %0d, expected %0d", a, b, sutra, want);
    end
    checks++;
    if (to_u != (want == SUTRA_URDHVA   ? ops : '0) ||
        to_e != (want == SUTRA_EKANYUNA ? ops : '0) ||
        to_n != (want == SUTRA_ANURUPYA ? ops : '0) ||
        to_a != (want == SUTRA_ANTYAYOR ? ops : '0)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d,%0d forwarded to the wrong unit", a, b);
    end
  endtask

  initial begin
    apply(170,  99, SUTRA_EKANYUNA);
    apply(153, 157, SUTRA_ANTYAYOR);
    apply(107, 109, SUTRA_ANURUPYA);
    apply(124, 159, SUTRA_URDHVA);
    for (int unsigned a = 0; a < 256; a++)
      for (int unsigned b = 0; b < 256; b++)
        apply(a, b, expected(a, b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
