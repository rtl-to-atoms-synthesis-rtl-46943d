// pe_core: combinational forward pass of one processing element.
//
// This is the logic-bearing part of the PE and contains no state, so it can
// be synthesised on its own by a flow that accepts only combinational logic.
// It holds the MAC (s_out = s_in + signExtend(w_mem * a, ACC_BITS)) and the
// memory controller (w_mem_out = w_load when mode is PRELOAD and target_y
// equals pe_y, else w_mem). The row index pe_y is an input so that one core
// netlist serves every PE; the clocked shell ties it to a constant.
//
// Interface: pe_y, mode, w_load, target_y, s_in, a, w_mem -> s_out, w_mem_out.
// The inputs, outputs and function follow the reference algorithm of the PE.
// The MAC result is computed in both modes; in PRELOAD it is simply not used.
module pe_core
  import mxu_pkg::*;
#(
  parameter int unsigned W_BITS   = 8,
  parameter int unsigned A_BITS   = 8,
  parameter int unsigned ACC_BITS = 24,
  parameter int unsigned Y_BITS   = 3
) (
  input  logic        [Y_BITS-1:0]   pe_y,
  input  mode_e                      mode,
  input  logic        [W_BITS-1:0]   w_load,
  input  logic        [Y_BITS-1:0]   target_y,
  input  logic signed [ACC_BITS-1:0] s_in,
  input  logic signed [A_BITS-1:0]   a,
  input  logic        [W_BITS-1:0]   w_mem,
  output logic signed [ACC_BITS-1:0] s_out,
  output logic        [W_BITS-1:0]   w_mem_out
);
  mac #(
    .W_BITS  (W_BITS),
    .A_BITS  (A_BITS),
    .ACC_BITS(ACC_BITS)
  ) u_mac (
    .w    (signed'(w_mem)),
    .a    (a),
    .s_in (s_in),
    .s_out(s_out)
  );

  mem_ctrl #(
    .W_BITS(W_BITS),
    .Y_BITS(Y_BITS)
  ) u_mem_ctrl (
    .mode     (mode),
    .target_y (target_y),
    .pe_y     (pe_y),
    .w_load   (w_load),
    .w_mem    (w_mem),
    .w_mem_out(w_mem_out)
  );
endmodule
