// reg_file: the registers the core keeps outside data memory: WREG, BSR, STATUS, STKPTR and
// the return-address stack addressed by STKPTR.
// Each register is a dual-rail register (dr_reg) with its own write port and acknowledge, so
// every writer has a direct connection and there is no shared bus. Reads: rd_of (operand
// fetch) reads all four registers; rd_id (decode) reads STATUS and the top of stack. Outputs
// are dual-rail and null while no read is requested.
// Return stack: STACK_DEPTH entries of PCW bits (PIC18: 31), entry i at index i, STKPTR = 0
// meaning empty. A dual-rail write request {index[4:0], address} stores an entry and raises
// sack; sack falls when the request returns to null. Stack over/underflow flags of PIC18 are
// not modelled (this design's choice).
module reg_file
  import nctu_pkg::*;
#(
  parameter int STACK_DEPTH = 31
) (
  input  logic         clk,
  input  logic         rst_n,
  // write ports (dual-rail) and their acknowledges
  input  logic [7:0]   wreg_t, wreg_f,
  output logic         wreg_ack,
  input  logic [7:0]   bsr_t, bsr_f,
  output logic         bsr_ack,
  input  logic [7:0]   status_t, status_f,
  output logic         status_ack,
  input  logic [7:0]   stkptr_t, stkptr_f,
  output logic         stkptr_ack,
  input  logic [PCW+4:0] stk_t, stk_f,
  output logic         stk_ack,
  // read requests and dual-rail read data
  input  logic         rd_of,
  input  logic         rd_id,
  output logic [7:0]   wreg_rt, wreg_rf,
  output logic [7:0]   bsr_rt, bsr_rf,
  output logic [7:0]   status_rt, status_rf,
  output logic [7:0]   stkptr_rt, stkptr_rf,
  output logic [PCW-1:0] tos_t, tos_f,
  // plain values for observation
  output logic [7:0]   wreg_q, bsr_q, status_q, stkptr_q
);
  logic [PCW-1:0] stack [STACK_DEPTH+1];
  logic stk_valid, stk_null;
  logic [PCW-1:0] tos;

  dr_reg #(.W(8)) u_wreg   (.clk, .rst_n, .din_t(wreg_t),   .din_f(wreg_f),   .ack(wreg_ack),
                            .read(rd_of), .dout_t(wreg_rt), .dout_f(wreg_rf), .q(wreg_q));
  dr_reg #(.W(8)) u_bsr    (.clk, .rst_n, .din_t(bsr_t),    .din_f(bsr_f),    .ack(bsr_ack),
                            .read(rd_of), .dout_t(bsr_rt), .dout_f(bsr_rf), .q(bsr_q));
  dr_reg #(.W(8)) u_status (.clk, .rst_n, .din_t(status_t), .din_f(status_f), .ack(status_ack),
                            .read(rd_of | rd_id), .dout_t(status_rt), .dout_f(status_rf), .q(status_q));
  dr_reg #(.W(8)) u_stkptr (.clk, .rst_n, .din_t(stkptr_t), .din_f(stkptr_f), .ack(stkptr_ack),
                            .read(rd_of | rd_id), .dout_t(stkptr_rt), .dout_f(stkptr_rf), .q(stkptr_q));

  // return stack
  assign stk_valid = &(stk_t | stk_f);
  assign stk_null  = ~|(stk_t | stk_f);
  always_ff @(posedge clk)
    if (stk_valid && !stk_ack) stack[stk_t[PCW +: 5]] <= stk_t[PCW-1:0];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)         stk_ack <= 1'b0;
    else if (stk_valid) stk_ack <= 1'b1;
    else if (stk_null)  stk_ack <= 1'b0;

  assign tos   = stack[stkptr_q[4:0]];
  assign tos_t = tos & {PCW{rd_id}};
  assign tos_f = ~tos & {PCW{rd_id}};
endmodule
