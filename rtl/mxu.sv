// mxu: quantized matrix multiply unit, a ROWS x COLS systolic array of PEs.
//
// Each PE multiplies its stored signed weight by the activation passing
// through it and adds the product to the partial sum coming from above.
// Activations enter at the left of each row and move one PE to the right
// every LOOP = 1 + RET_STAGES cycles. Partial sums enter at the top of each
// column and move one PE down per cycle; the bottom row delivers, for column
// c, s_in[c] + sum over rows r of W[r][c] * a[r]. Weight words travel down a
// column together with their control word c_w = {mode, target row}, one PE
// per cycle; the PE whose row index equals the target stores the word when
// the mode is PRELOAD (see pe for the hold time).
//
// Operation:
//   Preload: for column c and each row r, present w_in[c] = W[r][c],
//            mode_in[c] = PRELOAD, target_in[c] = r for LOOP cycles.
//   Compute: hold mode_in = COMPUTE. To form one output vector, present
//            activation a[r] on a_in[r] at cycle t0 + r and the initial partial
//            sum of column c on s_in[c] at cycle t0 + LOOP*c. The result of
//            column c appears on s_out[c] ROWS cycles after its s_in was
//            presented. A new vector can start every cycle.
// Ports are unpacked arrays indexed by row (a_*) or column (s_*, w_*, mode_*,
// target_*). a_out gives the activations leaving the right-hand column.
// Reset is synchronous, active low.
//
// The array organisation, the directions of a, w, c_w and s and the PE
// contents follow the document. The array size is not given there; 8 x 8 is
// this design's default. W8A8 with a 24-bit accumulator is the document's
// main configuration.
module mxu
  import mxu_pkg::*;
#(
  parameter int unsigned ROWS       = 8,
  parameter int unsigned COLS       = 8,
  parameter int unsigned W_BITS     = 8,
  parameter int unsigned A_BITS     = 8,
  parameter int unsigned ACC_BITS   = ACC_BITS_DEFAULT,
  parameter int unsigned RET_STAGES = 1,
  localparam int unsigned Y_BITS    = idx_bits(ROWS)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [A_BITS-1:0]   a_in      [ROWS],
  output logic signed [A_BITS-1:0]   a_out     [ROWS],
  input  logic        [W_BITS-1:0]   w_in      [COLS],
  input  mode_e                      mode_in   [COLS],
  input  logic        [Y_BITS-1:0]   target_in [COLS],
  input  logic signed [ACC_BITS-1:0] s_in      [COLS],
  output logic signed [ACC_BITS-1:0] s_out     [COLS]
);
  // Horizontal links: a_h[r][c] enters PE (r, c).
  logic signed [A_BITS-1:0]   a_h   [ROWS][COLS+1];
  // Vertical links: *_v[r][c] enters PE (r, c) from above.
  logic signed [ACC_BITS-1:0] s_v   [ROWS+1][COLS];
  logic        [W_BITS-1:0]   w_v   [ROWS+1][COLS];
  mode_e                      m_v   [ROWS+1][COLS];
  logic        [Y_BITS-1:0]   t_v   [ROWS+1][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_edge_row
    assign a_h[r][0] = a_in[r];
    assign a_out[r]  = a_h[r][COLS];
  end

  for (genvar c = 0; c < COLS; c++) begin : g_edge_col
    assign s_v[0][c] = s_in[c];
    assign w_v[0][c] = w_in[c];
    assign m_v[0][c] = mode_in[c];
    assign t_v[0][c] = target_in[c];
    assign s_out[c]  = s_v[ROWS][c];
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      pe #(
        .W_BITS    (W_BITS),
        .A_BITS    (A_BITS),
        .ACC_BITS  (ACC_BITS),
        .Y_BITS    (Y_BITS),
        .PE_Y      (r),
        .RET_STAGES(RET_STAGES)
      ) u_pe (
        .clk       (clk),
        .rst_n     (rst_n),
        .a_in      (a_h[r][c]),
        .a_out     (a_h[r][c+1]),
        .s_in      (s_v[r][c]),
        .s_out     (s_v[r+1][c]),
        .w_in      (w_v[r][c]),
        .mode_in   (m_v[r][c]),
        .target_in (t_v[r][c]),
        .w_out     (w_v[r+1][c]),
        .mode_out  (m_v[r+1][c]),
        .target_out(t_v[r+1][c])
      );
    end
  end
endmodule
