// tb_ripple_carry_adder: self-checking test of the ripple-carry adder.
//
// Two instances, 24 bits (the accumulator width) and 5 bits. The 5-bit one is
// checked exhaustively over a, b and cin; the 24-bit one with corner cases
// (all ones, carry through every bit) and random operands. Expected values
// are a + b + cin computed with the simulator's own arithmetic.
module tb_ripple_carry_adder;
  int checks = 0;
  int failures = 0;

  logic [23:0] a24, b24, s24;
  logic        c24, co24;
  logic [4:0]  a5, b5, s5;
  logic        c5, co5;

  ripple_carry_adder #(.WIDTH(24)) dut24 (.a(a24), .b(b24), .cin(c24), .sum(s24), .cout(co24));
  ripple_carry_adder #(.WIDTH(5))  dut5  (.a(a5),  .b(b5),  .cin(c5),  .sum(s5),  .cout(co5));

  task automatic check24(input logic [23:0] x, input logic [23:0] y, input logic ci);
    logic [24:0] expv;
    a24 = x; b24 = y; c24 = ci;
    #1;
    expv = {1'b0, x} + {1'b0, y} + 25'(ci);
    checks++;
    if ({co24, s24} !== expv) begin
      failures++;
      $display("FAIL 24-bit: %h + %h + %0d = %h, expected %h", x, y, ci, {co24, s24}, expv);
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
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++)
        for (int ci = 0; ci < 2; ci++) begin
          a5 = 5'(x); b5 = 5'(y); c5 = ci[0];
          #1;
          checks++;
          if ({co5, s5} !== 6'(x + y + ci)) begin
            failures++;
            $display("FAIL 5-bit: %0d + %0d + %0d = %0d", x, y, ci, {co5, s5});
          end
        end

    check24(24'hFFFFFF, 24'h000001, 1'b0);
    check24(24'hFFFFFF, 24'h000000, 1'b1);
    check24(24'hFFFFFF, 24'hFFFFFF, 1'b1);
    check24(24'h7FFFFF, 24'h000001, 1'b0);
    check24(24'h000000, 24'h000000, 1'b0);
    for (int i = 0; i < 2000; i++)
      check24(24'($urandom), 24'($urandom), 1'($urandom));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
