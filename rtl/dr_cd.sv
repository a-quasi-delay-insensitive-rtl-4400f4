// dr_cd: completion detector for a W-bit dual-rail word.
// done rises when every bit holds a valid codeword and falls when every bit is null; in
// between it holds (a tree of OR gates per bit followed by a C-element tree, modelled as one
// multi-input C-element). RST_VAL is the value during reset. Latency: one tick.
module dr_cd #(
  parameter int W = 8,
  parameter bit RST_VAL = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d_t, d_f,
  output logic         done
);
  logic [W-1:0] v;
  assign v = d_t | d_f;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)         done <= RST_VAL;
    else if (&v)        done <= 1'b1;
    else if (!(|v))     done <= 1'b0;
endmodule
