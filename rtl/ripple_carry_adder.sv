// ripple_carry_adder: WIDTH-bit adder built as a chain of full adders, the
// carry of bit i feeding bit i+1.
//
// The 4x4 and 8x8 Urdhva Tiryagbhyam multipliers each use three of these
// (4-bit and 8-bit respectively) to add their partial products, as the
// design prescribes. The full-adder chain is the textbook ripple structure;
// the carry input is an addition of this implementation so that the same
// adder could also subtract.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational; the delay
// grows linearly with WIDTH.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];
endmodule
