// prog_mem: program memory of the core, WORDS 16-bit instruction words.
// Two words are read at once, at word addresses raddr and raddr+1, so that the fetch stage can
// deliver the second word of a two-word instruction together with the first. The read is
// combinational. The contents are written through a synchronous load port (ld_we) before the
// core is released from reset; the core itself never writes. Size and the load port are this
// design's choice: the original only names the block.
module prog_mem #(
  parameter int WORDS = 4096,
  parameter int AW = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          ld_we,
  input  logic [AW-1:0] ld_addr,
  input  logic [15:0]   ld_data,
  input  logic [AW-1:0] raddr,
  output logic [15:0]   rdata0,
  output logic [15:0]   rdata1
);
  logic [15:0] mem [WORDS];
  always_ff @(posedge clk)
    if (ld_we) mem[ld_addr] <= ld_data;
  assign rdata0 = mem[raddr];
  assign rdata1 = mem[AW'(raddr + 1'b1)];
endmodule
