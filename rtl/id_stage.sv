// id_stage: instruction decode, with its four parts: Instruction Decode, Branch Control,
// Stall Control and NPC Control.
// Input: the IF/ID token {stall, pc, w1, w0}. While it is complete the stage requests a read
// (rd) of STATUS and the top of the return stack, and once those are valid it emits two
// tokens at once: the next-PC token {stall', npc} towards the PC, and the decoded instruction
// (nctu_pkg::idof_t: the instruction words plus control fields) towards operand fetch. Both
// return to null when the input does. The stage is purely combinational; the handshakes are
// carried by the surrounding latches.
// Conditional branches are two-pass instructions: when one arrives with the Stall bit clear,
// Stall Control makes NPC Control send the same pc again with the Stall bit set and a no-op
// goes down the pipeline. By the time the refetched branch returns, the preceding
// instruction has completed write-back, so Branch Control reads an up-to-date STATUS, picks
// taken / not taken and clears the Stall bit. This follows the original design; applying the
// same two-pass rule to RETURN (which reads the return stack) and carrying the Stall register
// inside the PC token are this design's own choices. Instruction encodings are those of
// PIC18; the FAST option of CALL/RETURN is ignored. Any word outside the implemented set,
// including the second word of MOVFF, CALL or GOTO when a branch lands on it, decodes as NOP,
// as on PIC18.
module id_stage
  import nctu_pkg::*;
(
  input  logic [PCW+32:0] in_t, in_f,
  output logic            rd,
  input  logic [7:0]      status_t, status_f,
  input  logic [PCW-1:0]  tos_t, tos_f,
  output logic [PCW:0]    npc_t, npc_f,       // {stall, npc}
  output logic [IDOF_W-1:0] idof_t_o, idof_f_o,
  // observation of Stall Control (for counting first passes)
  output logic            stall_pass
);
  typedef enum logic [2:0] {K_SEQ, K_COND, K_BRA, K_ABS, K_RET} kind_e;

  logic stall_in;
  logic [PCW-1:0] pc;
  logic [15:0] w0, w1;
  logic in_ok, ok;
  logic [7:0] status;
  idof_t d, dout;
  kind_e kind;
  logic two, taken, flag, stall_out;
  logic [PCW-1:0] seq, rel8, rel11, absa, npc;
  localparam logic [4:0] F_ALL = 5'b11111, F_ZN = 5'b10100, F_CZN = 5'b10101, F_Z = 5'b00100;

  assign {stall_in, pc, w1, w0} = in_t;
  assign status = status_t;
  assign in_ok  = &(in_t | in_f);
  assign rd     = in_ok;
  assign ok     = in_ok & (&(status_t | status_f)) & (&(tos_t | tos_f));

  // ---------------- Instruction Decode ----------------
  always_comb begin
    d = '0;
    d.w0 = w0; d.w1 = w1; d.ret = pc + PCW'(2);
    d.fcode = FC_PASS; d.op = OP_PASS; d.fmask = '0;
    d.s1sel = S1_F; d.s2sel = S2_W; d.dsel = DS_NONE; d.sop = SOP_NONE;
    kind = K_SEQ; two = 1'b0;
    casez (w0)
      16'b0000_0000_0000_0101: begin d.fcode = FC_ALU; d.op = OP_ADD; d.s2sel = S2_ONE; d.dsel = DS_F; d.sop = SOP_PUSH; end // PUSH
      16'b0000_0000_0000_0110: begin d.fcode = FC_ALU; d.op = OP_SUB; d.s2sel = S2_ONE; d.dsel = DS_F; d.sop = SOP_POP;  end // POP
      16'b0000_0000_0001_001?: begin d.fcode = FC_ALU; d.op = OP_SUB; d.s2sel = S2_ONE; d.dsel = DS_F; d.sop = SOP_POP; kind = K_RET; end // RETURN
      16'b0000_0001_0000_????: begin d.s1sel = S1_K; d.dsel = DS_BSR; end                                  // MOVLB
      16'b0000_001?_????_????: begin d.fcode = FC_MUL; d.s1sel = S1_W; d.s2sel = S2_F; d.dsel = DS_PROD; end // MULWF
      16'b0000_01??_????_????: begin d.fcode = FC_ALU; d.op = OP_SUB;  d.s2sel = S2_ONE; d.fmask = F_ALL; d.dsel = w0[9] ? DS_F : DS_W; end // DECF
      16'b0000_1000_????_????: begin d.fcode = FC_ALU; d.op = OP_SUB;  d.s1sel = S1_K; d.s2sel = S2_W; d.fmask = F_ALL; d.dsel = DS_W; end // SUBLW
      16'b0000_1001_????_????: begin d.fcode = FC_ALU; d.op = OP_IOR;  d.s1sel = S1_W; d.s2sel = S2_K; d.fmask = F_ZN;  d.dsel = DS_W; end // IORLW
      16'b0000_1010_????_????: begin d.fcode = FC_ALU; d.op = OP_XOR;  d.s1sel = S1_W; d.s2sel = S2_K; d.fmask = F_ZN;  d.dsel = DS_W; end // XORLW
      16'b0000_1011_????_????: begin d.fcode = FC_ALU; d.op = OP_AND;  d.s1sel = S1_W; d.s2sel = S2_K; d.fmask = F_ZN;  d.dsel = DS_W; end // ANDLW
      16'b0000_1101_????_????: begin d.fcode = FC_MUL; d.s1sel = S1_W; d.s2sel = S2_K; d.dsel = DS_PROD; end                              // MULLW
      16'b0000_1110_????_????: begin d.s1sel = S1_K; d.dsel = DS_W; end                                                                 // MOVLW
      16'b0000_1111_????_????: begin d.fcode = FC_ALU; d.op = OP_ADD;  d.s1sel = S1_W; d.s2sel = S2_K; d.fmask = F_ALL; d.dsel = DS_W; end // ADDLW
      16'b0001_00??_????_????: begin d.fcode = FC_ALU; d.op = OP_IOR;  d.fmask = F_ZN;  d.dsel = w0[9] ? DS_F : DS_W; end // IORWF
      16'b0001_01??_????_????: begin d.fcode = FC_ALU; d.op = OP_AND;  d.fmask = F_ZN;  d.dsel = w0[9] ? DS_F : DS_W; end // ANDWF
      16'b0001_10??_????_????: begin d.fcode = FC_ALU; d.op = OP_XOR;  d.fmask = F_ZN;  d.dsel = w0[9] ? DS_F : DS_W; end // XORWF
      16'b0001_11??_????_????: begin d.fcode = FC_ALU; d.op = OP_XOR;  d.s2sel = S2_FF; d.fmask = F_ZN; d.dsel = w0[9] ? DS_F : DS_W; end // COMF
      16'b0010_00??_????_????: begin d.fcode = FC_ALU; d.op = OP_ADDC; d.fmask = F_ALL; d.dsel = w0[9] ? DS_F : DS_W; end // ADDWFC
      16'b0010_01??_????_????: begin d.fcode = FC_ALU; d.op = OP_ADD;  d.fmask = F_ALL; d.dsel = w0[9] ? DS_F : DS_W; end // ADDWF
      16'b0010_10??_????_????: begin d.fcode = FC_ALU; d.op = OP_ADD;  d.s2sel = S2_ONE; d.fmask = F_ALL; d.dsel = w0[9] ? DS_F : DS_W; end // INCF
      16'b0011_00??_????_????: begin d.fcode = FC_ROT; d.op = ROT_RRC;  d.fmask = F_CZN; d.dsel = w0[9] ? DS_F : DS_W; end // RRCF
      16'b0011_01??_????_????: begin d.fcode = FC_ROT; d.op = ROT_RLC;  d.fmask = F_CZN; d.dsel = w0[9] ? DS_F : DS_W; end // RLCF
      16'b0100_00??_????_????: begin d.fcode = FC_ROT; d.op = ROT_RRNC; d.fmask = F_ZN;  d.dsel = w0[9] ? DS_F : DS_W; end // RRNCF
      16'b0100_01??_????_????: begin d.fcode = FC_ROT; d.op = ROT_RLNC; d.fmask = F_ZN;  d.dsel = w0[9] ? DS_F : DS_W; end // RLNCF
      16'b0101_00??_????_????: begin d.fcode = FC_ALU; d.op = OP_IOR;  d.s2sel = S2_ZERO; d.fmask = F_ZN; d.dsel = w0[9] ? DS_F : DS_W; end // MOVF
      16'b0101_01??_????_????: begin d.fcode = FC_ALU; d.op = OP_SUBB; d.s1sel = S1_W; d.s2sel = S2_F; d.fmask = F_ALL; d.dsel = w0[9] ? DS_F : DS_W; end // SUBFWB
      16'b0101_10??_????_????: begin d.fcode = FC_ALU; d.op = OP_SUBB; d.fmask = F_ALL; d.dsel = w0[9] ? DS_F : DS_W; end // SUBWFB
      16'b0101_11??_????_????: begin d.fcode = FC_ALU; d.op = OP_SUB;  d.fmask = F_ALL; d.dsel = w0[9] ? DS_F : DS_W; end // SUBWF
      16'b0110_100?_????_????: begin d.fcode = FC_ALU; d.op = OP_IOR;  d.s2sel = S2_FF;   d.dsel = DS_F; end                 // SETF
      16'b0110_101?_????_????: begin d.fcode = FC_ALU; d.op = OP_AND;  d.s2sel = S2_ZERO; d.fmask = F_Z; d.dsel = DS_F; end   // CLRF
      16'b0110_110?_????_????: begin d.fcode = FC_ALU; d.op = OP_SUB;  d.s1sel = S1_ZERO; d.s2sel = S2_F; d.fmask = F_ALL; d.dsel = DS_F; end // NEGF
      16'b0110_111?_????_????: begin d.s1sel = S1_W; d.dsel = DS_F; end                                                      // MOVWF
      16'b0111_????_????_????: begin d.fcode = FC_ALU; d.op = OP_XOR;  d.s2sel = S2_BIT;  d.dsel = DS_F; end                 // BTG
      16'b1000_????_????_????: begin d.fcode = FC_ALU; d.op = OP_IOR;  d.s2sel = S2_BIT;  d.dsel = DS_F; end                 // BSF
      16'b1001_????_????_????: begin d.fcode = FC_ALU; d.op = OP_AND;  d.s2sel = S2_NBIT; d.dsel = DS_F; end                 // BCF
      16'b1100_????_????_????: begin d.dsel = DS_MOVFF; two = 1'b1; end                                                      // MOVFF
      16'b1101_0???_????_????: kind = K_BRA;                                                                                 // BRA
      16'b1101_1???_????_????: begin d.fcode = FC_ALU; d.op = OP_ADD; d.s2sel = S2_ONE; d.dsel = DS_F; d.sop = SOP_PUSH; kind = K_BRA; end // RCALL
      16'b1110_0???_????_????: kind = K_COND;                                                                                // Bcc
      16'b1110_110?_????_????: begin d.fcode = FC_ALU; d.op = OP_ADD; d.s2sel = S2_ONE; d.dsel = DS_F; d.sop = SOP_PUSH;
                                     d.ret = pc + PCW'(4); kind = K_ABS; two = 1'b1; end                                      // CALL
      16'b1110_1111_????_????: begin kind = K_ABS; two = 1'b1; end                                                           // GOTO
      default: ;                                                                                                             // NOP
    endcase
  end

  // ---------------- Branch Control ----------------
  always_comb begin
    unique case (w0[10:9])
      2'b00:   flag = status[ST_Z];
      2'b01:   flag = status[ST_C];
      2'b10:   flag = status[ST_OV];
      default: flag = status[ST_N];
    endcase
    taken = flag ^ w0[8];
  end

  // ---------------- Stall Control and NPC Control ----------------
  assign seq   = pc + (two ? PCW'(4) : PCW'(2));
  assign rel8  = pc + PCW'(2) + {{(PCW-9){w0[7]}}, w0[7:0], 1'b0};
  assign rel11 = pc + PCW'(2) + {{(PCW-12){w0[10]}}, w0[10:0], 1'b0};
  assign absa  = PCW'({w1[11:0], w0[7:0], 1'b0});

  always_comb begin
    dout = d;
    stall_out = 1'b0;
    npc = seq;
    stall_pass = 1'b0;
    if ((kind == K_COND || kind == K_RET) && !stall_in) begin
      // first pass: fetch the same instruction again, send a no-op down the pipeline
      stall_out = 1'b1;
      stall_pass = ok;
      npc = pc;
      dout.fcode = FC_PASS; dout.fmask = '0; dout.dsel = DS_NONE; dout.sop = SOP_NONE;
    end else begin
      unique case (kind)
        K_COND:  npc = taken ? rel8 : seq;
        K_BRA:   npc = rel11;
        K_ABS:   npc = absa;
        K_RET:   npc = tos_t;
        default: npc = seq;
      endcase
    end
  end

  assign npc_t    = {stall_out, npc} & {(PCW+1){ok}};
  assign npc_f    = ~{stall_out, npc} & {(PCW+1){ok}};
  assign idof_t_o = dout & {IDOF_W{ok}};
  assign idof_f_o = ~dout & {IDOF_W{ok}};
endmodule
