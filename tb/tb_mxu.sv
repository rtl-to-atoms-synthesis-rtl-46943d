// tb_mxu: end-to-end test of the matrix multiply unit at its default size
// (8 x 8 PEs, W8A8, 24-bit partial sums, one return-pass stage).
//
// Two rounds, each: preload a random signed weight matrix W (row r's words
// are presented at every column for two cycles, target row r, mode PRELOAD),
// switch to COMPUTE and stream NV activation vectors, one per cycle, skewed
// by row, with the initial partial sum of column c presented 2*c cycles after
// the vector starts. The first vector starts as soon as the last preload word
// has been presented, so later preload words still travel down the columns
// while the upper rows already compute. The second round loads a new matrix
// into the array that has just computed with the first.
// Every column result is compared, at the exact cycle it is due, with
//   s_in + sum_r W[r][c] * a[r]   (mod 2^24)
// computed here in plain integer arithmetic; activations leaving the right
// edge are compared with their inputs 16 cycles earlier. Counted mechanisms:
// preload words, weight reloads, mode switches, back-to-back vectors,
// vectors with a non-zero incoming partial sum, cycles in which preload and
// compute overlap in the array. Any that never happened is a failure.
module tb_mxu;
  import mxu_pkg::*;
  localparam int ROWS = 8;
  localparam int COLS = 8;
  localparam int LOOP = 2;      // 1 + RET_STAGES
  localparam int NV   = 24;     // vectors per round
  localparam int NR   = 2;      // rounds
  localparam int T0   = 2 * ROWS;                              // compute start after preload start
  localparam int RLEN = T0 + NV + LOOP * COLS + ROWS + 2;      // cycles per round
  localparam int T    = NR * RLEN + 4;

  int checks = 0;
  int failures = 0;
  int n_preload_words = 0, n_reload = 0, n_mode_switch = 0, n_back_to_back = 0;
  int n_nonzero_sin = 0, n_overlap = 0, n_results = 0;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic signed [7:0]  a_in      [ROWS];
  logic signed [7:0]  a_out     [ROWS];
  logic        [7:0]  w_in      [COLS];
  mode_e              mode_in   [COLS];
  logic        [2:0]  target_in [COLS];
  logic signed [23:0] s_in      [COLS];
  logic signed [23:0] s_out     [COLS];

  mxu dut (
    .clk(clk), .rst_n(rst_n),
    .a_in(a_in), .a_out(a_out), .w_in(w_in), .mode_in(mode_in),
    .target_in(target_in), .s_in(s_in), .s_out(s_out));

  // Stimulus per cycle and expected column results per cycle.
  int d_a [T][ROWS];
  int d_s [T][COLS];
  int d_w [T][COLS];
  int d_t [T][COLS];
  bit d_p [T];              // 1: PRELOAD at every column this cycle
  bit e_v [T][COLS];
  int e_s [T][COLS];

  function automatic int wrap24(input int v);
    logic signed [23:0] x;
    x = 24'(v);
    return int'(x);
  endfunction

  function automatic int rnd8();
    return int'($urandom_range(255)) - 128;
  endfunction

  initial begin
    repeat (T + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Build the schedule.
  initial begin
    int wm [ROWS][COLS];
    int av [ROWS];
    int sv [COLS];
    for (int t = 0; t < T; t++) begin
      d_p[t] = 1'b0;
      for (int r = 0; r < ROWS; r++) d_a[t][r] = rnd8();
      for (int c = 0; c < COLS; c++) begin
        d_s[t][c] = wrap24(int'($urandom));
        d_w[t][c] = rnd8();
        d_t[t][c] = int'($urandom_range(ROWS - 1));
        e_v[t][c] = 1'b0;
        e_s[t][c] = 0;
      end
    end
    for (int rd = 0; rd < NR; rd++) begin
      int b;
      b = rd * RLEN;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) wm[r][c] = (r == 0 && c == 0) ? -128 : rnd8();
      // preload
      for (int r = 0; r < ROWS; r++)
        for (int k = 0; k < LOOP; k++) begin
          d_p[b + LOOP * r + k] = 1'b1;
          for (int c = 0; c < COLS; c++) begin
            d_w[b + LOOP * r + k][c] = wm[r][c];
            d_t[b + LOOP * r + k][c] = r;
          end
        end
      n_preload_words += ROWS * COLS;
      if (rd > 0) n_reload++;
      // compute
      for (int v = 0; v < NV; v++) begin
        int ts;
        for (int r = 0; r < ROWS; r++) begin
          av[r] = (v == 0) ? -128 : rnd8();
          d_a[b + T0 + v + r][r] = av[r];
        end
        for (int c = 0; c < COLS; c++) begin
          sv[c] = (v % 2 == 0) ? 0 : wrap24(int'($urandom));
          if (sv[c] != 0) n_nonzero_sin++;
          ts = b + T0 + v + LOOP * c;
          d_s[ts][c] = sv[c];
          e_v[ts + ROWS][c] = 1'b1;
          e_s[ts + ROWS][c] = sv[c];
          for (int r = 0; r < ROWS; r++) e_s[ts + ROWS][c] += wm[r][c] * av[r];
          e_s[ts + ROWS][c] = wrap24(e_s[ts + ROWS][c]);
        end
        if (v > 0) n_back_to_back++;
      end
      // The last preload word (row ROWS-1) reaches its PE ROWS-1 cycles
      // after it enters the array; from cycle b + T0 on, row 0 already
      // computes. Count the cycles in which both happen.
      for (int t = b + T0; t <= b + LOOP * ROWS - 1 + ROWS - 1; t++) n_overlap++;
    end
  end

  initial begin
    rst_n = 1'b0;
    for (int r = 0; r < ROWS; r++) a_in[r] = '0;
    for (int c = 0; c < COLS; c++) begin
      s_in[c] = '0; w_in[c] = '0; mode_in[c] = COMPUTE; target_in[c] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int t = 0; t < T; t++) begin
      for (int c = 0; c < COLS; c++)
        if (e_v[t][c]) begin
          checks++;
          n_results++;
          if (int'(s_out[c]) != e_s[t][c]) begin
            failures++;
            if (failures < 20)
              $display("FAIL s_out[%0d] at cycle %0d: %0d, expected %0d", c, t, s_out[c], e_s[t][c]);
          end
        end
      if (t >= LOOP * COLS)
        for (int r = 0; r < ROWS; r++) begin
          checks++;
          if (int'(a_out[r]) != d_a[t - LOOP * COLS][r]) begin
            failures++;
            if (failures < 20)
              $display("FAIL a_out[%0d] at cycle %0d: %0d, expected %0d", r, t, a_out[r], d_a[t - LOOP * COLS][r]);
          end
        end
      if (t > 0 && d_p[t] != d_p[t-1]) n_mode_switch++;
      for (int r = 0; r < ROWS; r++) a_in[r] = 8'(d_a[t][r]);
      for (int c = 0; c < COLS; c++) begin
        s_in[c]      = 24'(d_s[t][c]);
        w_in[c]      = 8'(d_w[t][c]);
        target_in[c] = 3'(d_t[t][c]);
        mode_in[c]   = d_p[t] ? PRELOAD : COMPUTE;
      end
      @(negedge clk);
    end

    checks++;
    if (n_results != NR * NV * COLS) begin
      failures++;
      $display("FAIL: %0d column results checked, expected %0d", n_results, NR * NV * COLS);
    end
    checks += 6;
    if (n_preload_words == 0) begin failures++; $display("FAIL: no preload"); end
    if (n_reload == 0)        begin failures++; $display("FAIL: no weight reload"); end
    if (n_mode_switch == 0)   begin failures++; $display("FAIL: no mode switch"); end
    if (n_back_to_back == 0)  begin failures++; $display("FAIL: no back-to-back vectors"); end
    if (n_nonzero_sin == 0)   begin failures++; $display("FAIL: no incoming partial sum"); end
    if (n_overlap == 0)       begin failures++; $display("FAIL: preload and compute never overlapped"); end
    $display("preload words %0d, reloads %0d, mode switches %0d, back-to-back vectors %0d",
             n_preload_words, n_reload, n_mode_switch, n_back_to_back);
    $display("non-zero incoming partial sums %0d, preload/compute overlap cycles %0d, results %0d",
             n_nonzero_sin, n_overlap, n_results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
