// delay_line_memory: clocked delay line of the PE return pass.
//
// A chain of DEPTH registers: q is d delayed by DEPTH clock cycles. In the PE
// one instance closes the weight storage loop (forward-pass register plus
// this line form a ring in which the stored weight circulates) and a second
// one carries the activation back across the PE so that it leaves towards the
// right-hand neighbour aligned with the pipeline. In the field-coupled fabric
// each register stands for one clock zone that a signal crosses.
//
// Interface: clk, rst_n (active-low, synchronous), d -> q. Reset clears all
// stages. The delay-line role is the document's; the register count per
// return pass (default 1) and the reset are this design's choices.
module delay_line_memory #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] stage [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else begin
      stage[0] <= d;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[DEPTH-1];

  initial begin
    assert (DEPTH >= 1) else $error("delay_line_memory: DEPTH must be at least 1");
  end
endmodule
