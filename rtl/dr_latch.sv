// dr_latch: one stage of a 4-phase dual-rail Muller pipeline, W bits wide.
// Each rail of each bit is a C-element whose inputs are the incoming rail and the inverted
// acknowledge of the next stage: a valid codeword is stored only while the next stage is
// empty (ack_in = 0) and the null spacer only while it is full (ack_in = 1). The stored word
// drives a completion detector whose output is the acknowledge returned to the previous stage
// (ack_out = 1: a valid word is held; 0: the latch is null). This is the pipeline latch of the
// original design, widened to W bits with one shared completion detector.
// RST_VALID/RST_VAL let a latch start holding a valid token (used for the PC); otherwise it
// starts null. Consecutive valid tokens in a chain of latches are always separated by a null
// latch, which gives the 50% occupancy the core relies on.
// An assertion checks that no stored bit is ever (1,1). It is disabled during reset, so
// rst_n is read by a clocked checker as well as being the asynchronous reset; lint tools
// report that mixed use, and it has no effect on the circuit.
module dr_latch #(
  parameter int W = 8,
  parameter bit RST_VALID = 1'b0,
  parameter logic [W-1:0] RST_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in_t, in_f,
  output logic         ack_out,
  output logic [W-1:0] out_t, out_f,
  input  logic         ack_in
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    c_element #(.RST_VAL(RST_VALID &  RST_VAL[i])) u_t (.clk, .rst_n, .a(in_t[i]), .b(~ack_in), .y(out_t[i]));
    c_element #(.RST_VAL(RST_VALID & ~RST_VAL[i])) u_f (.clk, .rst_n, .a(in_f[i]), .b(~ack_in), .y(out_f[i]));
  end
  dr_cd #(.W(W), .RST_VAL(RST_VALID)) u_cd (.clk, .rst_n, .d_t(out_t), .d_f(out_f), .done(ack_out));

  // a stored bit is never (1,1)
  a_no_illegal: assert property (@(posedge clk) disable iff (!rst_n) (out_t & out_f) == '0);
endmodule
