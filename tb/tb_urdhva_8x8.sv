// tb_urdhva_8x8: exhaustive self-checking test of the 8x8 Urdhva Tiryagbhyam
// multiplier: every pair of 8-bit operands is applied and the product is
// compared with the simulator's own multiplication.
module tb_urdhva_8x8;
  int checks = 0, failures = 0;

  logic [8-1:0]   a, b;
  logic [2*8-1:0] p;

  urdhva_8x8 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (2 * 8)); i++) begin
      {a, b} = (2*8)'(i);
      #1;
      checks++;
      if (p != (2*8)'(a) * (2*8)'(b)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d gave %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
