// mac: multiply-accumulate unit of the PE forward pass.
//
// s_out = s_in + signExtend(w * a, ACC_BITS), with w and a signed two's
// complement. The product comes from a Baugh-Wooley array multiplier and the
// accumulation from a ripple-carry adder, the two ALU structures chosen for
// the planar fabric. The accumulation wraps modulo 2^ACC_BITS.
//
// Interface: w (W_BITS), a (A_BITS), s_in (ACC_BITS) -> s_out (ACC_BITS).
// Purely combinational. The equation and the 24-bit width follow the
// reference algorithm of the PE; wrap-around on overflow is this design's
// choice (the document does not mention overflow).
module mac #(
  parameter int unsigned W_BITS   = 8,
  parameter int unsigned A_BITS   = 8,
  parameter int unsigned ACC_BITS = 24
) (
  input  logic signed [W_BITS-1:0]   w,
  input  logic signed [A_BITS-1:0]   a,
  input  logic signed [ACC_BITS-1:0] s_in,
  output logic signed [ACC_BITS-1:0] s_out
);
  localparam int unsigned PW = W_BITS + A_BITS;

  logic signed [PW-1:0]       prod;
  logic signed [ACC_BITS-1:0] prod_ext;
  logic                       cout;

  array_multiplier #(.X_BITS(W_BITS), .Y_BITS(A_BITS)) u_mul (
    .x(w),
    .y(a),
    .p(prod)
  );

  // Sign extension of the product to the accumulator width.
  assign prod_ext = ACC_BITS'(prod);

  ripple_carry_adder #(.WIDTH(ACC_BITS)) u_acc (
    .a   (s_in),
    .b   (prod_ext),
    .cin (1'b0),
    .sum (s_out),
    .cout(cout)                 // modulo 2^ACC_BITS accumulation
  );

  initial begin
    assert (ACC_BITS >= PW)
      else $error("mac: ACC_BITS must hold the full product");
  end
endmodule
