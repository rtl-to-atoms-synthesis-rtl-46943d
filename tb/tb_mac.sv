// tb_mac: self-checking test of the multiply-accumulate unit (W8A8, 24-bit).
//
// Checks s_out = s_in + w * a (mod 2^24) for corner operands (most negative
// values, zero, wrap-around of the accumulator) and random operands.
module tb_mac;
  int checks = 0;
  int failures = 0;

  logic signed [7:0]  w, a;
  logic signed [23:0] s_in, s_out;

  mac dut (.w(w), .a(a), .s_in(s_in), .s_out(s_out));

  task automatic try(input int wi, input int ai, input int si);
    logic signed [23:0] expv;
    w = 8'(wi); a = 8'(ai); s_in = 24'(si);
    #1;
    expv = 24'(int'(w) * int'(a) + int'(s_in));
    checks++;
    if (s_out !== expv) begin
      failures++;
      if (failures < 20) $display("FAIL: %0d + %0d * %0d = %0d, expected %0d", s_in, w, a, s_out, expv);
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
    try(-128, -128, 0);
    try(-128, 127, 0);
    try(127, 127, -1);
    try(0, -5, 12345);
    try(-1, 1, 0);
    try(3, 5, 8388607);      // wraps past the largest positive sum
    try(-3, 5, -8388608);    // wraps past the most negative sum
    for (int i = 0; i < 3000; i++)
      try(int'($urandom_range(255)) - 128, int'($urandom_range(255)) - 128,
          int'($urandom_range(16777215)) - 8388608);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
