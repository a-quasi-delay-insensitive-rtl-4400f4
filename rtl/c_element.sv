// c_element: two-input Muller C-element with reset.
// The output copies the inputs when they agree and holds its value when they differ
// (y = ab + ay + by, the gate-level form of the C-element). As in the original design the
// pipeline latches use a C-element with reset; RST_VAL selects the value taken during reset.
// Timing: the state-holding node is a flip-flop advanced by clk, a free-running tick that
// stands for one gate delay. This is this design's own modelling choice so that the
// delay-insensitive circuit can be simulated and synthesized without combinational loops;
// the handshakes built on it do not depend on the tick period.
module c_element #(
  parameter bit RST_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic y
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) y <= RST_VAL;
    else        y <= (a & b) | (y & (a | b));
endmodule
