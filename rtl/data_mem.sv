// data_mem: data memory (file registers) with its memory read/write control.
// BYTES bytes, addressed by the 12-bit physical address of the PIC18 data space.
// Read port: a dual-rail address; while it is a complete valid word, rdata carries the byte as
// a valid dual-rail word, and it is null otherwise (combinational).
// Write port: a dual-rail request {wide, addr[11:0], data[15:0]}. When the request is
// complete the byte data[7:0] is written at addr (and data[15:8] at addr+1 when wide is set,
// used for the 16-bit product PRODH:PRODL); wack then rises. wack falls when the request
// returns to null: a 4-phase handshake. Read and write are never active together in this core
// (the operand fetch and write-back stages are never busy at the same time), so no arbitration
// is needed. Memory size and port structure are this design's choice.
module data_mem #(
  parameter int BYTES = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] raddr_t, raddr_f,
  output logic [7:0]  rdata_t, rdata_f,
  input  logic [28:0] wreq_t, wreq_f,
  output logic        wack,
  input  logic [11:0] dbg_addr,
  output logic [7:0]  dbg_data
);
  localparam int AW = $clog2(BYTES);
  logic [7:0] mem [BYTES];
  logic rvalid, wvalid, wnull;
  logic [AW-1:0] ra, wa;
  logic [7:0] rd;

  assign rvalid = &(raddr_t | raddr_f);
  assign ra     = raddr_t[AW-1:0];
  assign rd     = mem[ra];
  assign rdata_t = rd & {8{rvalid}};
  assign rdata_f = ~rd & {8{rvalid}};

  assign wvalid = &(wreq_t | wreq_f);
  assign wnull  = ~|(wreq_t | wreq_f);
  assign wa     = wreq_t[16 +: AW];

  always_ff @(posedge clk)
    if (wvalid && !wack) begin
      mem[wa] <= wreq_t[7:0];
      if (wreq_t[28]) mem[AW'(wa + 1'b1)] <= wreq_t[15:8];
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      wack <= 1'b0;
    else if (wvalid) wack <= 1'b1;
    else if (wnull)  wack <= 1'b0;

  assign dbg_data = mem[dbg_addr[AW-1:0]];
endmodule
