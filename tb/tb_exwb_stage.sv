// tb_exwb_stage: applies OF/EX tokens to the execute/write-back stage. The write channels
// are answered by 4-phase responders in the testbench that record what was written and
// acknowledge after a random delay. For each token the test checks which channels were
// written and with what (results and flags worked out by hand), that no write starts while
// of_busy is high, that ack only rises after all used channels acknowledged, and that it
// falls after the token returns to null. Covers every execution element (ALU add and
// subtract, the dual-rail OR path, rotate through carry, multiply to the product
// registers, pass), the STATUS destination, the flag-update channel and the stack channel.
module tb_exwb_stage;
  import nctu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [OFEX_W-1:0] in_t = 0, in_f = 0;
  logic ack, of_busy = 0;
  logic [7:0] ch_t [4], ch_f [4];         // WREG, BSR, STATUS, STKPTR
  logic ch_ack [4];
  logic [PCW+4:0] stk_t, stk_f;
  logic stk_ack;
  logic [28:0] mem_t, mem_f;
  logic mem_ack;
  logic [3:0] unit_busy;
  logic [31:0] got [6];                   // last written value per channel (0-3 regs, 4 stack, 5 mem)
  int nwr [6];
  int checks = 0, failures = 0;

  exwb_stage dut (.clk, .rst_n, .in_t, .in_f, .ack, .of_busy,
    .wreg_t(ch_t[0]), .wreg_f(ch_f[0]), .wreg_ack(ch_ack[0]), .bsr_t(ch_t[1]), .bsr_f(ch_f[1]), .bsr_ack(ch_ack[1]),
    .status_t(ch_t[2]), .status_f(ch_f[2]), .status_ack(ch_ack[2]), .stkptr_t(ch_t[3]), .stkptr_f(ch_f[3]), .stkptr_ack(ch_ack[3]),
    .stk_t, .stk_f, .stk_ack, .mem_t, .mem_f, .mem_ack, .unit_busy);
  always #5 clk = ~clk;

  // 4-phase responders
  function automatic logic [31:0] chv(input int c);
    case (c) 0, 1, 2, 3: return 32'(ch_t[c]); 4: return 32'(stk_t); default: return 32'(mem_t); endcase
  endfunction
  function automatic logic chvalid(input int c);
    case (c) 0, 1, 2, 3: return &(ch_t[c] | ch_f[c]); 4: return &(stk_t | stk_f); default: return &(mem_t | mem_f); endcase
  endfunction
  function automatic logic chnull(input int c);
    case (c) 0, 1, 2, 3: return ~|(ch_t[c] | ch_f[c]); 4: return ~|(stk_t | stk_f); default: return ~|(mem_t | mem_f); endcase
  endfunction
  logic a_q [6];
  for (genvar c = 0; c < 6; c++) begin : g_resp
    initial begin
      a_q[c] = 0;
      forever begin
        @(posedge clk);
        if (chvalid(c) && !a_q[c]) begin
          got[c] = chv(c); nwr[c]++;
          repeat ($urandom_range(0, 3)) @(posedge clk);
          a_q[c] = 1;
        end else if (chnull(c) && a_q[c]) begin
          repeat ($urandom_range(0, 3)) @(posedge clk);
          a_q[c] = 0;
        end
      end
    end
  end
  assign ch_ack[0] = a_q[0]; assign ch_ack[1] = a_q[1]; assign ch_ack[2] = a_q[2]; assign ch_ack[3] = a_q[3];
  assign stk_ack = a_q[4]; assign mem_ack = a_q[5];

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // run one token; exp[c] = expected value or 'x-free marker: use mask of channels expected
  task automatic run(input string s, input ofex_t x, input logic [5:0] used, input logic [31:0] exp [6]);
    int nb [6];
    foreach (nb[c]) nb[c] = nwr[c];
    @(negedge clk);
    of_busy = 1;
    in_t = x; in_f = ~x;
    repeat (6) @(negedge clk);
    checks++;
    begin
      bit any;
      any = ack;
      for (int c = 0; c < 6; c++) if (nwr[c] != nb[c]) any = 1;
      if (any) begin failures++; $display("%s: wrote while of_busy", s); end
    end
    of_busy = 0;
    while (!ack) @(negedge clk);
    for (int c = 0; c < 6; c++) begin
      checks++;
      if (used[c]) begin
        if (nwr[c] != nb[c] + 1 || got[c] !== exp[c] || !a_q[c]) begin
          failures++; $display("%s: channel %0d got %h (%0d writes, ack %b) expected %h", s, c, got[c], nwr[c] - nb[c], a_q[c], exp[c]);
        end
      end else if (nwr[c] != nb[c]) begin
        failures++; $display("%s: channel %0d written unexpectedly", s, c);
      end
    end
    in_t = 0; in_f = 0;
    while (ack) @(negedge clk);
    checks++;
    for (int c = 0; c < 6; c++) if (a_q[c]) begin failures++; $display("%s: ack fell nb channel %0d", s, c); end
  endtask

  function automatic ofex_t tok(input fcode_e fc, input logic [2:0] op, input logic [7:0] s1, input logic [7:0] s2,
                                input logic [7:0] st, input logic [4:0] fm, input dest_e d, input logic [11:0] pa, input sop_e sop);
    ofex_t x;
    x = '0; x.fcode = fc; x.op = op; x.s1 = s1; x.s2 = s2; x.status = st; x.fmask = fm; x.dest = d; x.paddr = pa;
    x.sop = sop; x.ret = 21'h0ABCD;
    return x;
  endfunction

  initial begin
    logic [31:0] e [6];
    int seen [4];
    foreach (nwr[c]) nwr[c] = 0;
    foreach (seen[u]) seen[u] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (e[c]) e[c] = 0;
    // ADDLW: 7F + 01 -> 80, N=1 OV=1 Z=0 DC=1 C=0 -> WREG and STATUS
    e[0] = 32'h80; e[2] = 32'hE0 | 32'h1A;
    run("add", tok(FC_ALU, OP_ADD, 8'h7F, 8'h01, 8'hE0, 5'h1F, D_WREG, 12'h0, SOP_NONE), 6'b000101, e);
    // SUBWF: 10 - 20 = F0, borrow: C=0, DC=1 (no nibble borrow), N=1, OV=0
    e[5] = {3'b0, 1'b0, 12'h033, 8'h00, 8'hF0}; e[2] = 32'h12;
    run("sub", tok(FC_ALU, OP_SUB, 8'h10, 8'h20, 8'h01, 5'h1F, D_MEM, 12'h033, SOP_NONE), 6'b100100, e);
    // IORWF through the dual-rail OR gates: A0 | 05 = A5, N=1, Z=0
    e[0] = 32'hA5; e[2] = 32'h11;
    run("ior", tok(FC_ALU, OP_IOR, 8'hA0, 8'h05, 8'h05, 5'b10100, D_WREG, 12'h0, SOP_NONE), 6'b000101, e);
    // RLCF with C=1: 81 -> 03, C=1
    e[1] = 32'h03; e[2] = 32'h01;
    run("rlcf", tok(FC_ROT, ROT_RLC, 8'h81, 8'h00, 8'h01, 5'b10101, D_BSR, 12'h0, SOP_NONE), 6'b000110, e);
    // MULLW 12 * 34 = 03A8 -> PRODH:PRODL
    e[5] = {3'b0, 1'b1, 12'hFF3, 8'h03, 8'hA8};
    run("mul", tok(FC_MUL, 3'd0, 8'h12, 8'h34, 8'h00, 5'h0, D_PROD, 12'hFF3, SOP_NONE), 6'b100000, e);
    // MOVWF to STATUS: pass 5A into STATUS, flag channel not used
    e[2] = 32'h5A;
    run("status dest", tok(FC_PASS, OP_PASS, 8'h5A, 8'h00, 8'h00, 5'h00, D_STATUS, 12'hFD8, SOP_NONE), 6'b000100, e);
    // CLRF-like with STATUS as destination: flag update suppressed, STATUS = 00
    e[2] = 32'h00;
    run("status dest with flags", tok(FC_ALU, OP_AND, 8'h5A, 8'h00, 8'h00, 5'b00100, D_STATUS, 12'hFD8, SOP_NONE), 6'b000100, e);
    // PUSH: STKPTR 07 + 1 -> 08, stack[8] = return address
    e[3] = 32'h08; e[4] = {6'b0, 5'd8, 21'h0ABCD};
    run("push", tok(FC_ALU, OP_ADD, 8'h07, 8'h01, 8'h00, 5'h00, D_STKPTR, 12'hFFC, SOP_PUSH), 6'b011000, e);
    // NOP: no channel, bypass
    run("nop", tok(FC_PASS, OP_PASS, 8'h00, 8'h00, 8'h00, 5'h00, D_NONE, 12'h0, SOP_NONE), 6'b000000, e);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
