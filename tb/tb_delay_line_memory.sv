// tb_delay_line_memory: self-checking test of the return-pass delay line.
//
// Drives random words into a 1-stage and a 3-stage line every cycle and checks
// that each output equals the input of DEPTH cycles earlier, and that reset
// clears the line.
module tb_delay_line_memory;
  int checks = 0;
  int failures = 0;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [7:0] d;
  logic [7:0] q1, q3;
  logic [7:0] hist [$];

  always #5 clk = ~clk;

  delay_line_memory #(.WIDTH(8), .DEPTH(1)) dut1 (.clk(clk), .rst_n(rst_n), .d(d), .q(q1));
  delay_line_memory #(.WIDTH(8), .DEPTH(3)) dut3 (.clk(clk), .rst_n(rst_n), .d(d), .q(q3));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    d = 8'hA5;
    repeat (4) @(negedge clk);
    checks++;
    if (q1 !== 8'h00 || q3 !== 8'h00) begin
      failures++;
      $display("FAIL: reset did not clear the line (%h %h)", q1, q3);
    end
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      // hist[0] is the newest input; compare before driving the next one
      if (hist.size() >= 1) begin
        checks++;
        if (q1 !== hist[0]) begin
          failures++;
          $display("FAIL depth 1 at %0d: %h expected %h", t, q1, hist[0]);
        end
      end
      if (hist.size() >= 3) begin
        checks++;
        if (q3 !== hist[2]) begin
          failures++;
          $display("FAIL depth 3 at %0d: %h expected %h", t, q3, hist[2]);
        end
      end
      d = 8'($urandom);
      hist.push_front(d);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
