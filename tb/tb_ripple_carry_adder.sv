// tb_ripple_carry_adder: self-checking test of the ripple carry adder at the
// two widths the multiplier uses. The 4-bit adder is checked exhaustively
// (all a, b and carry-in values); the 8-bit adder on every a and b with a
// random carry-in. Expected sums come from the simulator's own addition.
module tb_ripple_carry_adder;
  int checks = 0, failures = 0;

  logic [3:0] a4, b4, s4;
  logic       ci4, co4;
  logic [7:0] a8, b8, s8;
  logic       ci8, co8;

  ripple_carry_adder #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4));
  ripple_carry_adder #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32 * 16; i++) begin
      {ci4, a4, b4} = 9'(i);
      #1;
      checks++;
      if ({co4, s4} != 5'(a4) + 5'(b4) + 5'(ci4)) begin
        failures++;
        $display("FAIL 4-bit %0d+%0d+%0d = %0d", a4, b4, ci4, {co4, s4});
      end
    end
    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      ci8 = 1'($urandom);
      #1;
      checks++;
      if ({co8, s8} != 9'(a8) + 9'(b8) + 9'(ci8)) begin
        failures++;
        $display("FAIL 8-bit %0d+%0d+%0d = %0d", a8, b8, ci8, {co8, s8});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
