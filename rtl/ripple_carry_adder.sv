// ripple_carry_adder: WIDTH-bit adder built as a chain of full adders.
//
// The carry of bit i feeds bit i+1, so the structure is a single regular row
// of identical cells with only nearest-neighbour wiring. That regularity is
// why this adder is chosen over faster carry-lookahead or prefix adders for a
// planar field-coupled fabric. Purely combinational: {cout, sum} = a + b + cin.
//
// Interface: a, b (WIDTH bits), cin -> sum (WIDTH bits), cout.
// The document names the adder type; the bit-level structure is the textbook one.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 24
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[WIDTH];
endmodule
