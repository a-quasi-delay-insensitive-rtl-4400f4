// dr_reg: W-bit dual-rail register (the QDI register of the original design, W copies).
// Each bit is a set/reset latch: din.t sets it, din.f clears it and the null word leaves it
// unchanged, so the value survives the return-to-zero phase. The write acknowledge of a bit is
// (din.t AND q) OR (din.f AND NOT q): it rises once the written value is held and falls when
// din returns to null; ack is the completion (C-element tree) of all bits. Reading: while
// read = 1 the value appears on dout as a valid dual-rail word, otherwise dout is null.
// Timing: the latch and the acknowledge tree each take one tick. RST_VAL is the reset content
// (reset of registers is this design's choice; the original does not describe it).
module dr_reg #(
  parameter int W = 8,
  parameter logic [W-1:0] RST_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din_t, din_f,
  output logic         ack,
  input  logic         read,
  output logic [W-1:0] dout_t, dout_f,
  output logic [W-1:0] q
);
  logic [W-1:0] bit_ack;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q <= RST_VAL;
    else        q <= din_t | (q & ~din_f);
  assign bit_ack = (din_t & q) | (din_f & ~q);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)              ack <= 1'b0;
    else if (&bit_ack)       ack <= 1'b1;
    else if (!(|(din_t | din_f))) ack <= 1'b0;
  assign dout_t = q & {W{read}};
  assign dout_f = ~q & {W{read}};
endmodule
