// array_multiplier: signed (two's complement) X_BITS x Y_BITS array multiplier.
//
// Partial products follow the Baugh-Wooley scheme, which makes a signed
// product out of AND gates, a few inverters and a constant, with no sign
// extension rows: partial-product bit x[j]&y[i] is inverted when exactly one
// of j, i is the operand's sign bit, and the constant
//   2^(X_BITS+Y_BITS-1) + 2^(X_BITS-1) + 2^(Y_BITS-1)
// is added (mod 2^(X_BITS+Y_BITS)). The rows are summed by a linear array of
// ripple-carry adders: row i adds its partial products into the running sum
// from bit i upwards, the bits below i being final already. The result is a
// regular, nearest-neighbour array of full adders.
//
// Interface: x, y (signed) -> p = x * y (signed, X_BITS+Y_BITS bits).
// Purely combinational. The document names the array multiplier; Baugh-Wooley
// partial products and the row organisation are this design's choices.
module array_multiplier #(
  parameter int unsigned X_BITS = 8,
  parameter int unsigned Y_BITS = 8
) (
  input  logic signed [X_BITS-1:0]        x,
  input  logic signed [Y_BITS-1:0]        y,
  output logic signed [X_BITS+Y_BITS-1:0] p
);
  localparam int unsigned PW = X_BITS + Y_BITS;

  // Baugh-Wooley correction constant.
  localparam logic [PW-1:0] BW_CONST =
      (PW'(1) << (PW - 1)) + (PW'(1) << (X_BITS - 1)) + (PW'(1) << (Y_BITS - 1));

  // Running sums: acc[0] is the constant, acc[Y_BITS] the product.
  logic [PW-1:0] acc [Y_BITS+1];

  assign acc[0] = BW_CONST;

  for (genvar i = 0; i < Y_BITS; i++) begin : g_row
    localparam int unsigned RW = PW - i;  // width of this row's adder
    logic [X_BITS-1:0] pp;
    logic [RW-1:0]     addend;
    logic [RW-1:0]     row_sum;
    logic              row_cout;

    for (genvar j = 0; j < X_BITS; j++) begin : g_pp
      if ((j == X_BITS - 1) != (i == Y_BITS - 1)) begin : g_inv
        assign pp[j] = ~(x[j] & y[i]);
      end else begin : g_and
        assign pp[j] = x[j] & y[i];
      end
    end

    assign addend = RW'(pp);

    ripple_carry_adder #(.WIDTH(RW)) u_row (
      .a   (acc[i][PW-1:i]),
      .b   (addend),
      .cin (1'b0),
      .sum (row_sum),
      .cout(row_cout)           // carry out of bit PW-1 is dropped (mod 2^PW)
    );

    if (i == 0) begin : g_first
      assign acc[i+1] = row_sum;
    end else begin : g_rest
      assign acc[i+1] = {row_sum, acc[i][i-1:0]};
    end
  end

  assign p = signed'(acc[Y_BITS]);

  initial begin
    assert (X_BITS >= 2 && Y_BITS >= 2)
      else $error("array_multiplier: operands need at least 2 bits");
  end
endmodule
