// tb_mem_ctrl: self-checking test of the PE memory controller.
//
// For every mode, target row and PE row (3-bit indices) and random weights,
// the written-back weight must be the loaded weight only in PRELOAD mode with
// a matching row, and the recirculated weight otherwise.
module tb_mem_ctrl;
  import mxu_pkg::*;
  int checks = 0;
  int failures = 0;

  mode_e       mode;
  logic [2:0]  target_y, pe_y;
  logic [7:0]  w_load, w_mem, w_mem_out;

  mem_ctrl dut (.mode(mode), .target_y(target_y), .pe_y(pe_y), .w_load(w_load),
                .w_mem(w_mem), .w_mem_out(w_mem_out));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++)
      for (int t = 0; t < 8; t++)
        for (int p = 0; p < 8; p++)
          for (int k = 0; k < 4; k++) begin
            logic [7:0] expv;
            mode = (m == 0) ? PRELOAD : COMPUTE;
            target_y = 3'(t);
            pe_y = 3'(p);
            w_load = 8'($urandom);
            w_mem = ~w_load;   // always different from w_load
            #1;
            expv = (m == 0 && t == p) ? w_load : w_mem;
            checks++;
            if (w_mem_out !== expv) begin
              failures++;
              $display("FAIL: mode=%0d target=%0d pe=%0d out=%h expected %h", m, t, p, w_mem_out, expv);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
