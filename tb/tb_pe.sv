// tb_pe: self-checking test of one clocked processing element (W8A8, row
// index 5, one return-pass stage, so the weight ring holds LOOP = 2 words).
//
// The test loads a weight into the PE, streams a new activation and partial
// sum every cycle (interleaved, independent MAC operations in every pipeline
// stage), sends a preload word for another row past it, loads a second
// weight and streams again. Each cycle it checks, from a record of what was
// driven: s_out one cycle later equals s_in + w * a for the weight the PE
// should hold; a_out equals a_in of LOOP cycles earlier; the weight word and
// c_w reach the outputs one cycle later. It counts preload writes, preloads
// for other rows, compute cycles and mode switches, and fails if one of them
// never happened.
module tb_pe;
  import mxu_pkg::*;
  localparam int LOOP = 2;
  localparam int PEY  = 5;
  localparam int T    = 80;

  int checks = 0;
  int failures = 0;
  int n_preload_hit = 0, n_preload_miss = 0, n_compute = 0, n_mode_switch = 0;

  logic               clk = 1'b0;
  logic               rst_n;
  logic signed [7:0]  a_in, a_out;
  logic signed [23:0] s_in, s_out;
  logic        [7:0]  w_in, w_out;
  mode_e              mode_in, mode_out;
  logic        [2:0]  target_in, target_out;

  always #5 clk = ~clk;

  pe #(.PE_Y(PEY)) dut (
    .clk(clk), .rst_n(rst_n),
    .a_in(a_in), .a_out(a_out), .s_in(s_in), .s_out(s_out),
    .w_in(w_in), .mode_in(mode_in), .target_in(target_in),
    .w_out(w_out), .mode_out(mode_out), .target_out(target_out));

  // What was driven in each cycle, and the weight the PE should then hold.
  int    h_a [T], h_s [T], h_w [T], h_t [T], h_wt [T];
  mode_e h_m [T];

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Value modulo 2^24, read as a signed 24-bit number.
  function automatic int wrap24(input int v);
    logic signed [23:0] x;
    x = 24'(v);
    return int'(x);
  endfunction

  task automatic expect_int(input string what, input int t, input int got, input int expv);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d: %0d, expected %0d", what, t, got, expv);
    end
  endtask

  initial begin
    int held;       // weight fully held by the ring
    int w1, w2, w3;
    w1 = -77; w2 = 99; w3 = 123;
    held = 0;       // reset clears the ring
    rst_n = 1'b0;
    a_in = '0; s_in = '0; w_in = '0; mode_in = COMPUTE; target_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int t = 0; t < T; t++) begin
      // Outputs now reflect the inputs of earlier cycles.
      if (t >= 1) begin
        if (h_m[t-1] == COMPUTE)
          expect_int("s_out", t, int'(s_out), wrap24(h_s[t-1] + h_wt[t-1] * h_a[t-1]));
        expect_int("w_out", t, int'(w_out), h_w[t-1]);
        expect_int("target_out", t, int'(target_out), h_t[t-1]);
        checks++;
        if (mode_out != h_m[t-1]) begin
          failures++;
          $display("FAIL mode_out at cycle %0d", t);
        end
      end
      if (t >= LOOP) expect_int("a_out", t, int'(a_out), h_a[t-LOOP]);

      // Stimulus for cycle t.
      a_in      = 8'($urandom);
      s_in      = 24'($urandom);
      w_in      = 8'($urandom);
      target_in = 3'($urandom);
      mode_in   = COMPUTE;
      if (t < 2) begin                       // load w1
        mode_in = PRELOAD; target_in = 3'(PEY); w_in = 8'(w1);
      end else if (t >= 30 && t < 32) begin   // preload word for row 2 passes by
        mode_in = PRELOAD; target_in = 3'd2; w_in = 8'(w2);
      end else if (t >= 50 && t < 52) begin   // load w3
        mode_in = PRELOAD; target_in = 3'(PEY); w_in = 8'(w3);
      end

      if (mode_in == PRELOAD && target_in == 3'(PEY)) n_preload_hit++;
      if (mode_in == PRELOAD && target_in != 3'(PEY)) n_preload_miss++;
      if (mode_in == COMPUTE) n_compute++;
      if (t > 0 && mode_in != h_m[t-1]) n_mode_switch++;

      // Weight held in cycle t: after LOOP consecutive writes the ring is full.
      if (t == 2) held = w1;
      if (t == 52) held = w3;
      h_wt[t] = held;
      h_a[t] = int'(a_in);
      h_s[t] = int'(s_in);
      h_w[t] = int'(w_in);
      h_t[t] = int'(target_in);
      h_m[t] = mode_in;
      @(negedge clk);
    end

    checks += 4;
    if (n_preload_hit == 0)  begin failures++; $display("FAIL: no preload write"); end
    if (n_preload_miss == 0) begin failures++; $display("FAIL: no preload for another row"); end
    if (n_compute == 0)      begin failures++; $display("FAIL: no compute cycle"); end
    if (n_mode_switch == 0)  begin failures++; $display("FAIL: no mode switch"); end
    $display("preload writes %0d, preloads for other rows %0d, compute cycles %0d, mode switches %0d",
             n_preload_hit, n_preload_miss, n_compute, n_mode_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
