// tb_pe_core: self-checking test of the combinational PE core in the three
// evaluated precisions, W2A2, W4A4 and W8A8 (24-bit partial sums in each).
//
// For each precision and random inputs (modes, target rows, weights,
// activations and partial sums, including the extreme values) it checks
// s_out = s_in + w_mem * a (mod 2^24) and that the weight written back is
// w_load exactly when mode is PRELOAD and target_y equals pe_y.
module tb_pe_core;
  import mxu_pkg::*;
  int checks = 0;
  int failures = 0;
  int preload_hits = 0;

  // One set of signals per precision; index 0: W2A2, 1: W4A4, 2: W8A8.
  mode_e              mode     [3];
  logic        [2:0]  target_y [3];
  logic        [2:0]  pe_y     [3];
  logic signed [23:0] s_in     [3];
  logic signed [23:0] s_out    [3];

  logic [1:0] wl2, wm2, wo2;  logic signed [1:0] a2;
  logic [3:0] wl4, wm4, wo4;  logic signed [3:0] a4;
  logic [7:0] wl8, wm8, wo8;  logic signed [7:0] a8;

  pe_core #(.W_BITS(2), .A_BITS(2)) dut_w2a2 (
    .pe_y(pe_y[0]), .mode(mode[0]), .w_load(wl2), .target_y(target_y[0]), .s_in(s_in[0]),
    .a(a2), .w_mem(wm2), .s_out(s_out[0]), .w_mem_out(wo2));
  pe_core #(.W_BITS(4), .A_BITS(4)) dut_w4a4 (
    .pe_y(pe_y[1]), .mode(mode[1]), .w_load(wl4), .target_y(target_y[1]), .s_in(s_in[1]),
    .a(a4), .w_mem(wm4), .s_out(s_out[1]), .w_mem_out(wo4));
  pe_core dut_w8a8 (
    .pe_y(pe_y[2]), .mode(mode[2]), .w_load(wl8), .target_y(target_y[2]), .s_in(s_in[2]),
    .a(a8), .w_mem(wm8), .s_out(s_out[2]), .w_mem_out(wo8));

  // Random value of a bits in two's complement, as an int.
  function automatic int rnd_signed(int bits);
    return int'($urandom_range((1 << bits) - 1)) - (1 << (bits - 1));
  endfunction

  task automatic run(input int cfg, input int bits, input int wm, input int ai, input int wl);
    int         si;
    logic [7:0] wo;
    logic [7:0] exp_w;
    logic signed [23:0] exp_s;
    si = (($urandom_range(3) == 0) ? 0 : rnd_signed(24));
    mode[cfg]     = ($urandom_range(1) == 0) ? PRELOAD : COMPUTE;
    target_y[cfg] = 3'($urandom);
    pe_y[cfg]     = ($urandom_range(1) == 0) ? target_y[cfg] : 3'($urandom);
    s_in[cfg]     = 24'(si);
    case (cfg)
      0: begin wm2 = 2'(wm); a2 = 2'(ai); wl2 = 2'(wl); end
      1: begin wm4 = 4'(wm); a4 = 4'(ai); wl4 = 4'(wl); end
      default: begin wm8 = 8'(wm); a8 = 8'(ai); wl8 = 8'(wl); end
    endcase
    #1;
    case (cfg)
      0: wo = 8'(wo2);
      1: wo = 8'(wo4);
      default: wo = wo8;
    endcase
    exp_s = 24'(si + wm * ai);
    if (mode[cfg] == PRELOAD && target_y[cfg] == pe_y[cfg]) begin
      exp_w = 8'(wl) & 8'((1 << bits) - 1);
      preload_hits++;
    end else begin
      exp_w = 8'(wm) & 8'((1 << bits) - 1);
    end
    checks += 2;
    if (s_out[cfg] !== exp_s) begin
      failures++;
      if (failures < 20) $display("FAIL W%0dA%0d s_out: %0d + %0d*%0d = %0d, expected %0d",
                                  bits, bits, si, wm, ai, s_out[cfg], exp_s);
    end
    if (wo !== exp_w) begin
      failures++;
      if (failures < 20) $display("FAIL W%0dA%0d w_mem_out = %h, expected %h", bits, bits, wo, exp_w);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cfg = 0; cfg < 3; cfg++) begin
      int bits;
      int lo, hi;
      bits = (cfg == 0) ? 2 : (cfg == 1) ? 4 : 8;
      lo = -(1 << (bits - 1));
      hi = (1 << (bits - 1)) - 1;
      // extreme operand pairs
      run(cfg, bits, lo, lo, hi);
      run(cfg, bits, lo, hi, lo);
      run(cfg, bits, hi, hi, 0);
      run(cfg, bits, -1, -1, 1);
      for (int i = 0; i < 1000; i++)
        run(cfg, bits, rnd_signed(bits), rnd_signed(bits), rnd_signed(bits));
    end
    checks++;
    if (preload_hits == 0) begin
      failures++;
      $display("FAIL: no preload write was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
