// tb_array_multiplier: self-checking test of the signed array multiplier.
//
// Covers the three operand widths of the evaluated configurations (2x2, 4x4,
// 8x8) and an unequal 3x5 case, each exhaustively over all operand pairs.
// Expected products come from the simulator's signed multiplication.
module tb_array_multiplier;
  int checks = 0;
  int failures = 0;

  logic signed [1:0] x2, y2;  logic signed [3:0]  p2;
  logic signed [3:0] x4, y4;  logic signed [7:0]  p4;
  logic signed [7:0] x8, y8;  logic signed [15:0] p8;
  logic signed [2:0] x3;  logic signed [4:0] y5;  logic signed [7:0] p35;

  array_multiplier #(.X_BITS(2), .Y_BITS(2)) dut2  (.x(x2), .y(y2), .p(p2));
  array_multiplier #(.X_BITS(4), .Y_BITS(4)) dut4  (.x(x4), .y(y4), .p(p4));
  array_multiplier                            dut8  (.x(x8), .y(y8), .p(p8));
  array_multiplier #(.X_BITS(3), .Y_BITS(5)) dut35 (.x(x3), .y(y5), .p(p35));

  task automatic expect_eq(input string tag, input int got, input int expv, input int xi, input int yi);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 20) $display("FAIL %s: %0d * %0d = %0d, expected %0d", tag, xi, yi, got, expv);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -2; i < 2; i++)
      for (int j = -2; j < 2; j++) begin
        x2 = 2'(i); y2 = 2'(j); #1;
        expect_eq("2x2", int'(p2), i * j, i, j);
      end
    for (int i = -8; i < 8; i++)
      for (int j = -8; j < 8; j++) begin
        x4 = 4'(i); y4 = 4'(j); #1;
        expect_eq("4x4", int'(p4), i * j, i, j);
      end
    for (int i = -128; i < 128; i++)
      for (int j = -128; j < 128; j++) begin
        x8 = 8'(i); y8 = 8'(j); #1;
        expect_eq("8x8", int'(p8), i * j, i, j);
      end
    for (int i = -4; i < 4; i++)
      for (int j = -16; j < 16; j++) begin
        x3 = 3'(i); y5 = 5'(j); #1;
        expect_eq("3x5", int'(p35), i * j, i, j);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
