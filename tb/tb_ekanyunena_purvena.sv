// tb_ekanyunena_purvena: self-checking test of the Ekanyunena Purvena unit.
// Every 8-bit multiplicand is multiplied by both all-nines multipliers (9
// and 99), including the worked example 70*99 = 6930 and 170*99 = 16830.
// Expected products come from the simulator's multiplication.
module tb_ekanyunena_purvena;
  import vedic_pkg::*;
  int checks = 0, failures = 0;

  operand_t x, y;
  product_t p;

  ekanyunena_purvena dut (.multiplicand(x), .multiplier(y), .product(p));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int unsigned a, int unsigned b);
    x = operand_t'(a);
    y = operand_t'(b);
    #1;
    checks++;
    if (32'(p) != a * b) begin
      failures++;
      $display("FAIL %0d * %0d gave %0d", a, b, p);
    end
  endtask

  initial begin
    check(70, 99);
    check(170, 99);
    for (int unsigned a = 0; a < 256; a++) begin
      check(a, 9);
      check(a, 99);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
