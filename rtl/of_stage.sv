// of_stage: operand fetch.
// Input: the decoded instruction token (nctu_pkg::idof_t, dual-rail) from the ID/OF latch.
// While it is complete the stage requests a register read (rd), forms the 12-bit physical
// address of the file operand (PIC18 rules: access bank when a = 0, BSR:f when a = 1; MOVFF
// carries full 12-bit source and destination addresses; stack operations address STKPTR),
// reads it from data memory or, through the remapping below, from the real registers, and
// selects the two sources S1/S2. It emits the OF/EX token (nctu_pkg::ofex_t): S1, S2, the
// current STATUS, the execution controls and the destination (DST). The output is valid once
// the input, the register reads and the memory read are all complete, and null when the
// input is null.
// Remapping: WREG, BSR, STATUS and STKPTR live in registers, not in data memory; a source or
// destination whose physical address is one of theirs (PIC18 addresses FE8h, FE0h, FD8h,
// FFCh) is redirected to the register. This follows the original design; the set of
// remapped addresses is that of the registers the core keeps.
module of_stage
  import nctu_pkg::*;
(
  input  logic [IDOF_W-1:0] in_t, in_f,
  output logic              rd,
  input  logic [7:0]        wreg_t, wreg_f,
  input  logic [7:0]        bsr_t, bsr_f,
  input  logic [7:0]        status_t, status_f,
  input  logic [7:0]        stkptr_t, stkptr_f,
  output logic [11:0]       maddr_t, maddr_f,
  input  logic [7:0]        mdata_t, mdata_f,
  output logic [OFEX_W-1:0] out_t, out_f
);
  idof_t c;
  ofex_t o;
  logic in_ok, regs_ok, addr_ok, ok;
  logic [7:0] f, fval, bmask;
  logic [11:0] fa, src, dst;

  assign c       = idof_t'(in_t);
  assign in_ok   = &(in_t | in_f);
  assign rd      = in_ok;
  assign regs_ok = &({wreg_t, bsr_t, status_t, stkptr_t} | {wreg_f, bsr_f, status_f, stkptr_f});
  assign addr_ok = in_ok & (&(bsr_t | bsr_f));

  // physical address of the file operand
  assign f  = c.w0[7:0];
  assign fa = c.w0[8] ? {bsr_t[3:0], f} : (f[7] ? {4'hF, f} : {4'h0, f});
  always_comb begin
    if (c.sop != SOP_NONE)      src = A_STKPTR;
    else if (c.dsel == DS_MOVFF) src = c.w0[11:0];
    else                        src = fa;
    dst = (c.dsel == DS_MOVFF) ? c.w1[11:0] : src;
  end
  assign maddr_t = src & {12{addr_ok}};
  assign maddr_f = ~src & {12{addr_ok}};

  // source remapping
  always_comb begin
    unique case (src)
      A_WREG:   fval = wreg_t;
      A_BSR:    fval = bsr_t;
      A_STATUS: fval = status_t;
      A_STKPTR: fval = stkptr_t;
      default:  fval = mdata_t;
    endcase
  end

  assign bmask = 8'(1 << c.w0[11:9]);

  always_comb begin
    o = '0;
    unique case (c.s1sel)
      S1_F:    o.s1 = fval;
      S1_W:    o.s1 = wreg_t;
      S1_K:    o.s1 = c.w0[7:0];
      default: o.s1 = 8'h00;
    endcase
    unique case (c.s2sel)
      S2_W:    o.s2 = wreg_t;
      S2_F:    o.s2 = fval;
      S2_K:    o.s2 = c.w0[7:0];
      S2_ONE:  o.s2 = 8'h01;
      S2_ZERO: o.s2 = 8'h00;
      S2_FF:   o.s2 = 8'hFF;
      S2_BIT:  o.s2 = bmask;
      default: o.s2 = ~bmask;
    endcase
    o.status = status_t;
    o.fcode  = c.fcode;
    o.op     = c.op;
    o.fmask  = c.fmask;
    o.sop    = c.sop;
    o.ret    = c.ret;
    o.paddr  = dst;
    // destination remapping
    unique case (c.dsel)
      DS_NONE: o.dest = D_NONE;
      DS_W:    o.dest = D_WREG;
      DS_BSR:  o.dest = D_BSR;
      DS_PROD: begin o.dest = D_PROD; o.paddr = A_PRODL; end
      default: begin
        unique case (dst)
          A_WREG:   o.dest = D_WREG;
          A_BSR:    o.dest = D_BSR;
          A_STATUS: o.dest = D_STATUS;
          A_STKPTR: o.dest = D_STKPTR;
          default:  o.dest = D_MEM;
        endcase
      end
    endcase
  end

  assign ok    = in_ok & regs_ok & (&(mdata_t | mdata_f));
  assign out_t = o & {OFEX_W{ok}};
  assign out_f = ~o & {OFEX_W{ok}};
endmodule
