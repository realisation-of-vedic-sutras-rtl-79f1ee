// tb_antyayor_dasakepi: self-checking test of the Antyayor Dasakepi unit over its whole
// operating range: every pair of 8-bit operands with the same leading decimal part and last digits summing to ten is applied, and the
// product is compared with the simulator's multiplication. The worked
// examples 47*43 and 153*157 are among them.
module tb_antyayor_dasakepi;
  import vedic_pkg::*;
  int checks = 0, failures = 0;

  operand_t x, y;
  product_t p;

  antyayor_dasakepi dut (.multiplicand(x), .multiplier(y), .product(p));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned a = 0; a < 256; a++) begin
      for (int unsigned b = 0; b < 256; b++) begin
        if (a / 10 == b / 10 && (a % 10) + (b % 10) == 10) begin
          x = operand_t'(a);
          y = operand_t'(b);
          #1;
          checks++;
          if (32'(p) != a * b) begin
            failures++;
            if (failures < 10) $display("FAIL %0d * %0d gave %0d", a, b, p);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
