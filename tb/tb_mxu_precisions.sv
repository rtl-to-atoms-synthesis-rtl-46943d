// tb_mxu_precisions: the evaluated low-precision configurations, W2A2 and
// W4A4, run through the whole array (8 x 8 PEs, 24-bit partial sums). Each
// configuration loads a weight matrix and streams 24 vectors; see mxu_runner
// for what is checked. The W8A8 configuration is covered by tb_mxu.
module tb_mxu_precisions;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks2, failures2, checks4, failures4;
  logic done2, done4;
  int   checks, failures;

  always #5 clk = ~clk;

  mxu_runner #(.ROWS(8), .COLS(8), .W_BITS(2), .A_BITS(2), .NV(24)) run_w2a2 (
    .clk(clk), .rst_n(rst_n), .checks(checks2), .failures(failures2), .done(done2));
  mxu_runner #(.ROWS(8), .COLS(8), .W_BITS(4), .A_BITS(4), .NV(24)) run_w4a4 (
    .clk(clk), .rst_n(rst_n), .checks(checks4), .failures(failures4), .done(done4));

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks2 + checks4, failures2 + failures4 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done2 && done4);
    checks = checks2 + checks4;
    failures = failures2 + failures4;
    $display("W2A2: %0d checks, %0d failures; W4A4: %0d checks, %0d failures",
             checks2, failures2, checks4, failures4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
