// tb_urdhva_2x2: exhaustive self-checking test of the 2x2 Urdhva Tiryagbhyam
// multiplier: every pair of 2-bit operands is applied and the product is
// compared with the simulator's own multiplication.
module tb_urdhva_2x2;
  int checks = 0, failures = 0;

  logic [2-1:0]   a, b;
  logic [2*2-1:0] p;

  urdhva_2x2 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (2 * 2)); i++) begin
      {a, b} = (2*2)'(i);
      #1;
      checks++;
      if (p != (2*2)'(a) * (2*2)'(b)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d gave %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
