// exwb_stage: execution and write-back stage.
// Input: the OF/EX token (nctu_pkg::ofex_t, dual-rail). Output: the write-back acknowledge
// ack, returned to the OF/EX latch, plus one dual-rail write channel per destination.
// EX sub-stage: a DeMUX steers the operand bundle {op, status, s2, s1} to one execution
// element chosen by the function code (rotate, ALU, multiply, or the bypass path that passes
// s1 through); the others see null. A MERGE ORs the element outputs and its completion
// detection says when the result, and with it the new STATUS, is ready, however long the
// chosen element took.
// WB sub-stage: a second DeMUX sends the result to the destination given by dest: data
// memory (byte, or the 16-bit product to PRODL/PRODH), WREG, BSR, STATUS or STKPTR, or to
// no destination (bypass). In parallel the new STATUS (old bits outside fmask kept) is
// written when the instruction updates flags, and for PUSH, CALL and RCALL the return
// address is written to the stack entry given by the incremented STKPTR. A write into
// STATUS as destination takes precedence over the flag update.
// Writes start only once the ID/OF latch has returned to null (of_busy = 0): operand fetch of
// this instruction is then over and cannot see its own results (the OF and EX/WB stages are
// never active together).
// ack rises once every channel the instruction uses has acknowledged its write, and falls
// once the input is null and every acknowledge has fallen (a generalised C-element), so the
// OF/EX latch only takes the next instruction after the write-back is complete.
// The structure follows the original block diagram; the encodings are this design's own.
module exwb_stage
  import nctu_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [OFEX_W-1:0] in_t, in_f,
  output logic              ack,
  input  logic              of_busy,      // ID/OF latch still holds the instruction
  // register write channels
  output logic [7:0]        wreg_t, wreg_f,
  input  logic              wreg_ack,
  output logic [7:0]        bsr_t, bsr_f,
  input  logic              bsr_ack,
  output logic [7:0]        status_t, status_f,
  input  logic              status_ack,
  output logic [7:0]        stkptr_t, stkptr_f,
  input  logic              stkptr_ack,
  output logic [PCW+4:0]    stk_t, stk_f,
  input  logic              stk_ack,
  // data memory write channel {wide, addr, data16}
  output logic [28:0]       mem_t, mem_f,
  input  logic              mem_ack,
  // observation: which execution element the current token uses (one-hot, valid with input)
  output logic [3:0]        unit_busy
);
  ofex_t x;
  logic in_ok, in_null, res_ok;
  logic [26:0] opnd;
  logic [26:0] u_t [4], u_f [4];
  logic [20:0] r_t [4], r_f [4];
  logic [20:0] m_t, m_f;
  logic [7:0] res, hi, nstat;
  logic [4:0] fl;
  logic use_dest, use_stat, use_stk, dest_ack, stat_ack, stk_ok, all_done, all_low;

  assign x       = ofex_t'(in_t);
  assign in_ok   = &(in_t | in_f);
  assign in_null = ~|(in_t | in_f);
  assign opnd    = {x.op, x.status, x.s2, x.s1};

  // ---------------- EX: DeMUX ----------------
  for (genvar u = 0; u < 4; u++) begin : g_demux
    logic sel;
    assign sel     = in_ok & (x.fcode == fcode_e'(u));
    assign u_t[u]  = opnd & {27{sel}};
    assign u_f[u]  = ~opnd & {27{sel}};
    assign unit_busy[u] = sel;
  end

  // execution elements
  assign r_t[FC_PASS] = {x.status[4:0], 8'h00, x.s1} & {21{&(u_t[FC_PASS] | u_f[FC_PASS])}};
  assign r_f[FC_PASS] = ~{x.status[4:0], 8'h00, x.s1} & {21{&(u_t[FC_PASS] | u_f[FC_PASS])}};
  ex_alu u_alu (.clk, .rst_n, .in_t(u_t[FC_ALU]), .in_f(u_f[FC_ALU]), .out_t(r_t[FC_ALU]), .out_f(r_f[FC_ALU]));
  ex_rot u_rot (.in_t(u_t[FC_ROT]), .in_f(u_f[FC_ROT]), .out_t(r_t[FC_ROT]), .out_f(r_f[FC_ROT]));
  ex_mul u_mul (.in_t(u_t[FC_MUL]), .in_f(u_f[FC_MUL]), .out_t(r_t[FC_MUL]), .out_f(r_f[FC_MUL]));

  // ---------------- EX: MERGE ----------------
  assign m_t    = r_t[0] | r_t[1] | r_t[2] | r_t[3];
  assign m_f    = r_f[0] | r_f[1] | r_f[2] | r_f[3];
  assign res_ok = in_ok & (&(m_t | m_f));
  assign {fl, hi, res} = m_t;
  assign nstat  = {x.status[7:5], (x.status[4:0] & ~x.fmask) | (fl & x.fmask)};

  // ---------------- WB: DeMUX to the destinations ----------------
  function automatic logic [7:0] enc8(input logic [7:0] v, input logic en, input logic rail);
    return (rail ? v : ~v) & {8{en}};
  endfunction

  logic to_w, to_b, to_s, to_p, to_m, to_fl, to_stk;
  logic go;
  assign go     = res_ok & ~of_busy;
  assign to_w   = go & (x.dest == D_WREG);
  assign to_b   = go & (x.dest == D_BSR);
  assign to_s   = go & (x.dest == D_STATUS);
  assign to_p   = go & (x.dest == D_STKPTR);
  assign to_m   = go & (x.dest == D_MEM || x.dest == D_PROD);
  assign to_fl  = go & (x.fmask != 5'd0) & (x.dest != D_STATUS);
  assign to_stk = go & (x.sop == SOP_PUSH);

  assign wreg_t   = enc8(res, to_w, 1'b1);  assign wreg_f   = enc8(res, to_w, 1'b0);
  assign bsr_t    = enc8(res, to_b, 1'b1);  assign bsr_f    = enc8(res, to_b, 1'b0);
  assign stkptr_t = enc8(res, to_p, 1'b1);  assign stkptr_f = enc8(res, to_p, 1'b0);
  assign status_t = enc8(res, to_s, 1'b1) | enc8(nstat, to_fl, 1'b1);
  assign status_f = enc8(res, to_s, 1'b0) | enc8(nstat, to_fl, 1'b0);

  logic [28:0] mw;
  logic [PCW+4:0] sw;
  assign mw    = {x.dest == D_PROD, x.paddr, (x.dest == D_PROD) ? hi : 8'h00, res};
  assign mem_t = mw & {29{to_m}};
  assign mem_f = ~mw & {29{to_m}};
  assign sw    = {res[4:0], x.ret};
  assign stk_t = sw & {(PCW+5){to_stk}};
  assign stk_f = ~sw & {(PCW+5){to_stk}};

  // ---------------- WB: MERGE of the acknowledges ----------------
  always_comb begin
    unique case (x.dest)
      D_WREG:        dest_ack = wreg_ack;
      D_BSR:         dest_ack = bsr_ack;
      D_STATUS:      dest_ack = status_ack;
      D_STKPTR:      dest_ack = stkptr_ack;
      D_MEM, D_PROD: dest_ack = mem_ack;
      default:       dest_ack = 1'b1;            // bypass
    endcase
  end
  assign use_dest = 1'b1;
  assign use_stat = (x.fmask != 5'd0) & (x.dest != D_STATUS);
  assign use_stk  = (x.sop == SOP_PUSH);
  assign stat_ack = use_stat ? status_ack : 1'b1;
  assign stk_ok   = use_stk ? stk_ack : 1'b1;
  assign all_done = go & use_dest & dest_ack & stat_ack & stk_ok;
  assign all_low  = in_null & ~|(m_t | m_f) &
                    ~(wreg_ack | bsr_ack | status_ack | stkptr_ack | mem_ack | stk_ack);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        ack <= 1'b0;
    else if (all_done) ack <= 1'b1;
    else if (all_low)  ack <= 1'b0;
endmodule
