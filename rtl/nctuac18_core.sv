// nctuac18_core: a PIC18-compatible 8-bit microprocessor core built as a quasi-delay-
// insensitive, dual-rail, 4-phase pipeline.
// Four stages (IF, ID, OF, EX/WB) are separated by dual-rail pipeline latches (IF/ID,
// ID/OF, OF/EX). The PC is itself a pipeline latch that starts holding one valid token (the
// reset vector 0); the loop PC -> IF -> IF/ID -> ID -> NPC latch -> PC carries that token
// round, one instruction per trip. The IF/ID latch forks to the NPC latch and the ID/OF
// latch, so it waits for both (a C-element joins their acknowledges). The OF/EX latch is
// acknowledged by the write-back completion of EX/WB. Because a valid token is always
// followed by a null one, operand fetch of an instruction can only start after the previous
// instruction's write-back has finished, which removes data hazards without forwarding.
// Conditional branches and RETURN pass through ID twice (see id_stage).
// Timing: all C-elements and registers advance on clk, which stands for one gate delay;
// nothing in the handshakes depends on its period. rst_n (active low) puts every latch in
// its initial state. The program memory is loaded through the ld_* port while rst_n is low.
// Observation ports: the PC token, the registers, a data-memory read port and the
// write-back acknowledge (one rising edge per instruction leaving EX/WB), the first-pass
// indication of Stall Control and the execution element in use (pass, ALU, rotate, multiply).
// From the original design: the four stages and their latches, the register set (WREG, BSR,
// STATUS, STKPTR, Stall), the 50% pipeline used against data hazards, two-pass conditional
// branches, remapping in OF and the DeMUX-MERGE execution stage. This design's own choices:
// the NPC latch that closes the PC loop, the acknowledge join at the IF/ID fork, the Stall
// register carried as a bit of the PC token, EX/WB waiting for the ID/OF latch to empty before
// it writes (of_busy), the memory sizes and the load and observation ports. Lint reports
// rst_n as used both synchronously and asynchronously; the synchronous use is only the
// disable condition of the latch assertions.
module nctuac18_core
  import nctu_pkg::*;
#(
  parameter int PROG_WORDS = 4096,
  parameter int DATA_BYTES = 4096,
  parameter int STACK_DEPTH = 31
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ld_we,
  input  logic [$clog2(PROG_WORDS)-1:0] ld_addr,
  input  logic [15:0] ld_data,
  output logic [PCW-1:0] dbg_pc,
  output logic        dbg_pc_valid,
  output logic        dbg_wb_ack,
  output logic [7:0]  dbg_wreg,
  output logic [7:0]  dbg_bsr,
  output logic [7:0]  dbg_status,
  output logic [7:0]  dbg_stkptr,
  input  logic [11:0] dbg_addr,
  output logic [7:0]  dbg_data,
  output logic        dbg_stall_pass,
  output logic [3:0]  dbg_unit
);
  localparam int AW = $clog2(PROG_WORDS);
  localparam int IFW = PCW + 33;

  // PC loop
  logic [PCW:0] pc_t, pc_f, npcin_t, npcin_f, npc_t, npc_f;
  logic pc_ack, npc_ack;
  // IF/ID
  logic [IFW-1:0] ifin_t, ifin_f, ifq_t, ifq_f;
  logic ifid_ack, ifid_ackin;
  logic [AW-1:0] imem_addr;
  logic [15:0] imem_w0, imem_w1;
  logic if_read;
  // ID/OF
  logic [IDOF_W-1:0] idin_t, idin_f, idq_t, idq_f;
  logic idof_ack;
  // OF/EX
  logic [OFEX_W-1:0] ofin_t, ofin_f, ofq_t, ofq_f;
  logic ofex_ack, wb_ack;
  // register reads
  logic rd_id, rd_of, stall_pass;
  logic [7:0] wreg_rt, wreg_rf, bsr_rt, bsr_rf, status_rt, status_rf, stkptr_rt, stkptr_rf;
  logic [PCW-1:0] tos_t, tos_f;
  // register and memory writes
  logic [7:0] wreg_wt, wreg_wf, bsr_wt, bsr_wf, status_wt, status_wf, stkptr_wt, stkptr_wf;
  logic wreg_ack, bsr_ack, status_ack, stkptr_ack, stk_ack, mem_ack;
  logic [PCW+4:0] stk_t, stk_f;
  logic [28:0] memw_t, memw_f;
  logic [11:0] maddr_t, maddr_f;
  logic [7:0] mdata_t, mdata_f;
  logic [3:0] unit_busy;

  // ---- PC (pipeline latch holding the initial token) and NPC latch ----
  dr_latch #(.W(PCW+1), .RST_VALID(1'b1), .RST_VAL('0)) u_pc (
    .clk, .rst_n, .in_t(npc_t), .in_f(npc_f), .ack_out(pc_ack),
    .out_t(pc_t), .out_f(pc_f), .ack_in(ifid_ack));
  dr_latch #(.W(PCW+1)) u_npc (
    .clk, .rst_n, .in_t(npcin_t), .in_f(npcin_f), .ack_out(npc_ack),
    .out_t(npc_t), .out_f(npc_f), .ack_in(pc_ack));

  // ---- IF ----
  prog_mem #(.WORDS(PROG_WORDS)) u_prog (
    .clk, .ld_we, .ld_addr, .ld_data, .raddr(imem_addr), .rdata0(imem_w0), .rdata1(imem_w1));
  if_stage #(.AW(AW)) u_if (
    .pc_t, .pc_f, .imem_addr, .imem_w0, .imem_w1, .out_t(ifin_t), .out_f(ifin_f), .read(if_read));
  dr_latch #(.W(IFW)) u_ifid (
    .clk, .rst_n, .in_t(ifin_t), .in_f(ifin_f), .ack_out(ifid_ack),
    .out_t(ifq_t), .out_f(ifq_f), .ack_in(ifid_ackin));
  // fork: IF/ID waits for both the NPC latch and the ID/OF latch
  c_element u_join (.clk, .rst_n, .a(npc_ack), .b(idof_ack), .y(ifid_ackin));

  // ---- ID ----
  id_stage u_id (
    .in_t(ifq_t), .in_f(ifq_f), .rd(rd_id), .status_t(status_rt), .status_f(status_rf),
    .tos_t, .tos_f, .npc_t(npcin_t), .npc_f(npcin_f), .idof_t_o(idin_t), .idof_f_o(idin_f),
    .stall_pass);
  dr_latch #(.W(IDOF_W)) u_idof (
    .clk, .rst_n, .in_t(idin_t), .in_f(idin_f), .ack_out(idof_ack),
    .out_t(idq_t), .out_f(idq_f), .ack_in(ofex_ack));

  // ---- OF ----
  of_stage u_of (
    .in_t(idq_t), .in_f(idq_f), .rd(rd_of),
    .wreg_t(wreg_rt), .wreg_f(wreg_rf), .bsr_t(bsr_rt), .bsr_f(bsr_rf),
    .status_t(status_rt), .status_f(status_rf), .stkptr_t(stkptr_rt), .stkptr_f(stkptr_rf),
    .maddr_t, .maddr_f, .mdata_t, .mdata_f, .out_t(ofin_t), .out_f(ofin_f));
  dr_latch #(.W(OFEX_W)) u_ofex (
    .clk, .rst_n, .in_t(ofin_t), .in_f(ofin_f), .ack_out(ofex_ack),
    .out_t(ofq_t), .out_f(ofq_f), .ack_in(wb_ack));

  // ---- EX/WB ----
  exwb_stage u_exwb (
    .clk, .rst_n, .in_t(ofq_t), .in_f(ofq_f), .ack(wb_ack), .of_busy(idof_ack),
    .wreg_t(wreg_wt), .wreg_f(wreg_wf), .wreg_ack, .bsr_t(bsr_wt), .bsr_f(bsr_wf), .bsr_ack,
    .status_t(status_wt), .status_f(status_wf), .status_ack,
    .stkptr_t(stkptr_wt), .stkptr_f(stkptr_wf), .stkptr_ack,
    .stk_t, .stk_f, .stk_ack, .mem_t(memw_t), .mem_f(memw_f), .mem_ack, .unit_busy);

  // ---- registers and data memory ----
  reg_file #(.STACK_DEPTH(STACK_DEPTH)) u_regs (
    .clk, .rst_n,
    .wreg_t(wreg_wt), .wreg_f(wreg_wf), .wreg_ack, .bsr_t(bsr_wt), .bsr_f(bsr_wf), .bsr_ack,
    .status_t(status_wt), .status_f(status_wf), .status_ack,
    .stkptr_t(stkptr_wt), .stkptr_f(stkptr_wf), .stkptr_ack, .stk_t, .stk_f, .stk_ack,
    .rd_of, .rd_id,
    .wreg_rt, .wreg_rf, .bsr_rt, .bsr_rf, .status_rt, .status_rf, .stkptr_rt, .stkptr_rf,
    .tos_t, .tos_f,
    .wreg_q(dbg_wreg), .bsr_q(dbg_bsr), .status_q(dbg_status), .stkptr_q(dbg_stkptr));
  data_mem #(.BYTES(DATA_BYTES)) u_dmem (
    .clk, .rst_n, .raddr_t(maddr_t), .raddr_f(maddr_f), .rdata_t(mdata_t), .rdata_f(mdata_f),
    .wreq_t(memw_t), .wreq_f(memw_f), .wack(mem_ack), .dbg_addr, .dbg_data);

  assign dbg_pc       = pc_t[PCW-1:0];
  assign dbg_pc_valid = if_read;
  assign dbg_wb_ack   = wb_ack;
  assign dbg_stall_pass = stall_pass;
  assign dbg_unit     = unit_busy;
endmodule
