// pe: clocked shell of one processing element of the systolic array.
//
// The shell wraps the combinational pe_core and adds the state that the core
// leaves out, so that the core itself stays free of feedback:
//   * forward-pass register: captures the new partial sum (sent down), the
//     weight chosen by the memory controller (sent into the return pass), the
//     activation (sent into the return pass) and the weight word with its
//     control (mode, target row), which is passed on to the PE below;
//   * return pass: two delay_line_memory instances of RET_STAGES registers.
//     One feeds the weight back to the core as w_mem, closing a ring of
//     LOOP = 1 + RET_STAGES registers in which the stored weight circulates.
//     The other carries the activation to a_out for the PE on the right.
//
// Timing (cycles from input to output): s_in -> s_out 1; w_in, mode_in,
// target_in -> w_out, mode_out, target_out 1; a_in -> a_out LOOP.
// A weight is stored when the PE sees mode PRELOAD with target_in == PE_Y;
// every register of the ring must be written for the PE to hold it, so a
// preload word is presented for LOOP consecutive cycles (an assertion checks
// this in simulation). In COMPUTE mode the
// MAC uses whichever copy is in the ring at that cycle.
// Reset (active-low, synchronous) clears the partial sum, the stored weight
// and the activation, and sets the forwarded mode to COMPUTE.
//
// The split into combinational core and clocked shell, the forward and return
// passes and the delay-line memory follow the document. The register count of
// the return pass, the preload hold time and the reset are this design's choices.
module pe
  import mxu_pkg::*;
#(
  parameter int unsigned W_BITS     = 8,
  parameter int unsigned A_BITS     = 8,
  parameter int unsigned ACC_BITS   = 24,
  parameter int unsigned Y_BITS     = 3,
  parameter int unsigned PE_Y       = 0,
  parameter int unsigned RET_STAGES = 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // activation, left to right
  input  logic signed [A_BITS-1:0]   a_in,
  output logic signed [A_BITS-1:0]   a_out,
  // partial sum, top to bottom
  input  logic signed [ACC_BITS-1:0] s_in,
  output logic signed [ACC_BITS-1:0] s_out,
  // weight word and its control c_w, top to bottom
  input  logic        [W_BITS-1:0]   w_in,
  input  mode_e                      mode_in,
  input  logic        [Y_BITS-1:0]   target_in,
  output logic        [W_BITS-1:0]   w_out,
  output mode_e                      mode_out,
  output logic        [Y_BITS-1:0]   target_out
);
  localparam logic [Y_BITS-1:0] MY_Y = Y_BITS'(PE_Y);

  logic signed [ACC_BITS-1:0] core_s;
  logic        [W_BITS-1:0]   core_w;
  logic        [W_BITS-1:0]   w_mem;
  logic        [W_BITS-1:0]   w_fwd_q;
  logic        [A_BITS-1:0]   a_fwd_q;
  logic        [A_BITS-1:0]   a_ret;

  pe_core #(
    .W_BITS  (W_BITS),
    .A_BITS  (A_BITS),
    .ACC_BITS(ACC_BITS),
    .Y_BITS  (Y_BITS)
  ) u_core (
    .pe_y     (MY_Y),
    .mode     (mode_in),
    .w_load   (w_in),
    .target_y (target_in),
    .s_in     (s_in),
    .a        (a_in),
    .w_mem    (w_mem),
    .s_out    (core_s),
    .w_mem_out(core_w)
  );

  // Forward-pass pipeline register.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_out      <= '0;
      w_fwd_q    <= '0;
      a_fwd_q    <= '0;
      w_out      <= '0;
      mode_out   <= COMPUTE;
      target_out <= '0;
    end else begin
      s_out      <= core_s;
      w_fwd_q    <= core_w;
      a_fwd_q    <= a_in;
      w_out      <= w_in;
      mode_out   <= mode_in;
      target_out <= target_in;
    end
  end

  // Return pass: weight ring and activation alignment.
  delay_line_memory #(.WIDTH(W_BITS), .DEPTH(RET_STAGES)) u_wmem (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (w_fwd_q),
    .q    (w_mem)
  );

  delay_line_memory #(.WIDTH(A_BITS), .DEPTH(RET_STAGES)) u_aret (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (a_fwd_q),
    .q    (a_ret)
  );

  assign a_out = signed'(a_ret);

  // Usage rule: a preload word for this PE must stay on the inputs for LOOP
  // consecutive cycles, so that every register of the weight ring is written.
  logic preload_hit;
  assign preload_hit = (mode_in == PRELOAD) && (target_in == MY_Y);

  a_preload_hold: assert property (
    @(posedge clk) disable iff (!rst_n)
      (preload_hit && !$past(preload_hit)) |=> (preload_hit && $stable(w_in)) [*RET_STAGES]
  ) else $error("pe row %0d: preload word held for fewer than %0d cycles", PE_Y, 1 + RET_STAGES);

  initial begin
    assert (PE_Y < (1 << Y_BITS)) else $error("pe: PE_Y does not fit in Y_BITS");
  end
endmodule
