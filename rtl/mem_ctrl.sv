// mem_ctrl: memory controller of the PE forward pass.
//
// Decides which weight is written into the PE's delay-line memory this cycle:
// the weight arriving from above (w_load) when the control word says PRELOAD
// and its target row equals this PE's row index, otherwise the weight just
// read from the delay line (w_mem), which keeps circulating unchanged.
//
// Interface: mode, target_y, pe_y, w_load, w_mem -> w_mem_out.
// Purely combinational. The update rule is the document's; holding the old
// weight in every other case is implied by the delay-line storage.
module mem_ctrl
  import mxu_pkg::*;
#(
  parameter int unsigned W_BITS = 8,
  parameter int unsigned Y_BITS = 3
) (
  input  mode_e              mode,
  input  logic [Y_BITS-1:0]  target_y,
  input  logic [Y_BITS-1:0]  pe_y,
  input  logic [W_BITS-1:0]  w_load,
  input  logic [W_BITS-1:0]  w_mem,
  output logic [W_BITS-1:0]  w_mem_out
);
  always_comb begin
    if (mode == PRELOAD && target_y == pe_y) begin
      w_mem_out = w_load;
    end else begin
      w_mem_out = w_mem;
    end
  end
endmodule
