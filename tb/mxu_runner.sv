// mxu_runner: testbench driver that runs one matrix multiply unit of a given
// size and precision through a complete operation and checks it.
//
// It loads a random signed W_BITS weight matrix (each row's words held for
// LOOP cycles), then streams NV back-to-back A_BITS activation vectors with
// the row skew and column offsets the array needs, and compares every column
// result, at the cycle it is due, with s_in + sum_r W[r][c] * a[r] mod 2^24
// worked out in integer arithmetic. The first weight and the first vector
// use the most negative values of their widths. It raises done when finished
// and reports its counts on checks and failures.
module mxu_runner
  import mxu_pkg::*;
#(
  parameter int ROWS   = 4,
  parameter int COLS   = 4,
  parameter int W_BITS = 8,
  parameter int A_BITS = 8,
  parameter int NV     = 16
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int LOOP   = 2;
  localparam int YB     = idx_bits(ROWS);
  localparam int T0     = LOOP * ROWS;
  localparam int T      = T0 + NV + LOOP * COLS + ROWS + 4;

  logic signed [A_BITS-1:0] a_in      [ROWS];
  logic signed [A_BITS-1:0] a_out     [ROWS];
  logic        [W_BITS-1:0] w_in      [COLS];
  mode_e                    mode_in   [COLS];
  logic        [YB-1:0]     target_in [COLS];
  logic signed [23:0]       s_in      [COLS];
  logic signed [23:0]       s_out     [COLS];

  mxu #(.ROWS(ROWS), .COLS(COLS), .W_BITS(W_BITS), .A_BITS(A_BITS)) dut (
    .clk(clk), .rst_n(rst_n),
    .a_in(a_in), .a_out(a_out), .w_in(w_in), .mode_in(mode_in),
    .target_in(target_in), .s_in(s_in), .s_out(s_out));

  int d_a [T][ROWS];
  int d_s [T][COLS];
  int d_w [T][COLS];
  int d_t [T][COLS];
  bit d_p [T];
  bit e_v [T][COLS];
  int e_s [T][COLS];

  function automatic int wrap24(input int v);
    logic signed [23:0] x;
    x = 24'(v);
    return int'(x);
  endfunction

  function automatic int rnd(input int bits);
    return int'($urandom_range((1 << bits) - 1)) - (1 << (bits - 1));
  endfunction

  initial begin
    int wm [ROWS][COLS];
    int av [ROWS];
    int ts, sv;
    checks = 0;
    failures = 0;
    done = 1'b0;
    for (int t = 0; t < T; t++) begin
      d_p[t] = 1'b0;
      for (int r = 0; r < ROWS; r++) d_a[t][r] = rnd(A_BITS);
      for (int c = 0; c < COLS; c++) begin
        d_s[t][c] = wrap24(int'($urandom));
        d_w[t][c] = rnd(W_BITS);
        d_t[t][c] = int'($urandom_range(ROWS - 1));
        e_v[t][c] = 1'b0;
        e_s[t][c] = 0;
      end
    end
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        wm[r][c] = (r == 0 && c == 0) ? -(1 << (W_BITS - 1)) : rnd(W_BITS);
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < LOOP; k++) begin
        d_p[LOOP * r + k] = 1'b1;
        for (int c = 0; c < COLS; c++) begin
          d_w[LOOP * r + k][c] = wm[r][c];
          d_t[LOOP * r + k][c] = r;
        end
      end
    for (int v = 0; v < NV; v++) begin
      for (int r = 0; r < ROWS; r++) begin
        av[r] = (v == 0) ? -(1 << (A_BITS - 1)) : rnd(A_BITS);
        d_a[T0 + v + r][r] = av[r];
      end
      for (int c = 0; c < COLS; c++) begin
        sv = (v % 2 == 0) ? 0 : wrap24(int'($urandom));
        ts = T0 + v + LOOP * c;
        d_s[ts][c] = sv;
        e_v[ts + ROWS][c] = 1'b1;
        e_s[ts + ROWS][c] = sv;
        for (int r = 0; r < ROWS; r++) e_s[ts + ROWS][c] += wm[r][c] * av[r];
        e_s[ts + ROWS][c] = wrap24(e_s[ts + ROWS][c]);
      end
    end

    for (int r = 0; r < ROWS; r++) a_in[r] = '0;
    for (int c = 0; c < COLS; c++) begin
      s_in[c] = '0; w_in[c] = '0; mode_in[c] = COMPUTE; target_in[c] = '0;
    end
    @(posedge rst_n);
    @(negedge clk);
    for (int t = 0; t < T; t++) begin
      for (int c = 0; c < COLS; c++)
        if (e_v[t][c]) begin
          checks++;
          if (int'(s_out[c]) != e_s[t][c]) begin
            failures++;
            if (failures < 10)
              $display("FAIL W%0dA%0d s_out[%0d] at cycle %0d: %0d, expected %0d",
                       W_BITS, A_BITS, c, t, s_out[c], e_s[t][c]);
          end
        end
      for (int r = 0; r < ROWS; r++) a_in[r] = A_BITS'(d_a[t][r]);
      for (int c = 0; c < COLS; c++) begin
        s_in[c]      = 24'(d_s[t][c]);
        w_in[c]      = W_BITS'(d_w[t][c]);
        target_in[c] = YB'(d_t[t][c]);
        mode_in[c]   = d_p[t] ? PRELOAD : COMPUTE;
      end
      @(negedge clk);
    end
    checks++;
    if (checks != NV * COLS + 1) begin
      failures++;
      $display("FAIL W%0dA%0d: %0d results checked, expected %0d", W_BITS, A_BITS, checks - 1, NV * COLS);
    end
    done = 1'b1;
  end
endmodule
