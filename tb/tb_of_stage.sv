// tb_of_stage: applies decoded-instruction tokens to the operand-fetch stage with registers
// and a data memory modelled in the testbench, and checks S1, S2, the physical address and
// the remapped destination: access-bank and banked file operands, an operand at a special
// register address (redirected to WREG or STATUS), MOVFF source/destination, a stack
// operation (STKPTR), bit masks for BSF/BCF, literals, and the product destination.
module tb_of_stage;
  import nctu_pkg::*;
  logic [IDOF_W-1:0] in_t = 0, in_f = 0;
  logic rd;
  logic [7:0] wreg_t, wreg_f, bsr_t, bsr_f, status_t, status_f, stkptr_t, stkptr_f, mdata_t, mdata_f;
  logic [11:0] maddr_t, maddr_f;
  logic [OFEX_W-1:0] out_t, out_f;
  logic [7:0] W = 8'h3C, BSR = 8'h05, ST = 8'h13, SP = 8'h07;
  ofex_t o;
  int checks = 0, failures = 0;
  of_stage dut (.in_t, .in_f, .rd, .wreg_t, .wreg_f, .bsr_t, .bsr_f, .status_t, .status_f, .stkptr_t, .stkptr_f,
                .maddr_t, .maddr_f, .mdata_t, .mdata_f, .out_t, .out_f);
  // register read model and memory model (byte at a = a[7:0] ^ 8'hA5)
  assign {wreg_t, bsr_t, status_t, stkptr_t} = rd ? {W, BSR, ST, SP} : '0;
  assign {wreg_f, bsr_f, status_f, stkptr_f} = rd ? ~{W, BSR, ST, SP} : '0;
  wire mvalid = &(maddr_t | maddr_f);
  assign mdata_t = mvalid ? (maddr_t[7:0] ^ 8'hA5) ^ {4'h0, maddr_t[11:8]} : 8'h00;
  assign mdata_f = mvalid ? ~((maddr_t[7:0] ^ 8'hA5) ^ {4'h0, maddr_t[11:8]}) : 8'h00;
  function automatic logic [7:0] mem(input logic [11:0] a); return (a[7:0] ^ 8'hA5) ^ {4'h0, a[11:8]}; endfunction
  assign o = ofex_t'(out_t);

  task automatic apply(input logic [15:0] w0, input logic [15:0] w1, input s1sel_e s1, input s2sel_e s2,
                       input dsel_e ds, input sop_e sop);
    idof_t c;
    c = '0; c.w0 = w0; c.w1 = w1; c.s1sel = s1; c.s2sel = s2; c.dsel = ds; c.sop = sop; c.fcode = FC_ALU; c.ret = 21'h1234;
    in_t = c; in_f = ~c; #1;
  endtask
  task automatic expect_out(input string s, input logic [7:0] s1, input logic [7:0] s2, input logic [11:0] pa, input dest_e dst);
    checks++;
    if (out_t !== ~out_f || !(&(out_t | out_f)) || o.s1 !== s1 || o.s2 !== s2 || o.paddr !== pa || o.dest !== dst || o.status !== ST) begin
      failures++; $display("%s: s1 %h s2 %h pa %h dest %0d; expected %h %h %h %0d", s, o.s1, o.s2, o.paddr, o.dest, s1, s2, pa, dst);
    end
    in_t = 0; in_f = 0; #1;
    checks++; if (out_t !== 0 || out_f !== 0) begin failures++; $display("%s: output not null", s); end
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #1;
    // ADDWF 0x12,F, access bank
    apply(16'h2612, 0, S1_F, S2_W, DS_F, SOP_NONE);
    expect_out("access bank", mem(12'h012), W, 12'h012, D_MEM);
    // ADDWF 0x12,F banked (a = 1): BSR = 5
    apply(16'h2712, 0, S1_F, S2_W, DS_F, SOP_NONE);
    expect_out("banked", mem(12'h512), W, 12'h512, D_MEM);
    // MOVF 0xE8 (access bank high half = FE8h = WREG) -> remap to WREG
    apply(16'h52E8, 0, S1_F, S2_ZERO, DS_F, SOP_NONE);
    expect_out("WREG remap", W, 8'h00, 12'hFE8, D_WREG);
    // STATUS as file operand
    apply(16'h26D8, 0, S1_F, S2_W, DS_F, SOP_NONE);
    expect_out("STATUS remap", ST, W, 12'hFD8, D_STATUS);
    // MOVFF 0x234 -> 0x056
    apply(16'hC234, 16'hF056, S1_F, S2_W, DS_MOVFF, SOP_NONE);
    expect_out("MOVFF", mem(12'h234), W, 12'h056, D_MEM);
    // PUSH: STKPTR source and destination
    apply(16'h0005, 0, S1_F, S2_ONE, DS_F, SOP_PUSH);
    expect_out("PUSH", SP, 8'h01, 12'hFFC, D_STKPTR);
    // BSF 0x20,5 and BCF 0x20,2
    apply(16'h8A20, 0, S1_F, S2_BIT, DS_F, SOP_NONE);
    expect_out("BSF", mem(12'h020), 8'h20, 12'h020, D_MEM);
    apply(16'h9420, 0, S1_F, S2_NBIT, DS_F, SOP_NONE);
    expect_out("BCF", mem(12'h020), 8'hFB, 12'h020, D_MEM);
    // SUBLW 0x77 -> W
    apply(16'h0877, 0, S1_K, S2_W, DS_W, SOP_NONE);
    expect_out("SUBLW", 8'h77, W, 12'h077, D_WREG);
    // MULLW -> product
    apply(16'h0D10, 0, S1_W, S2_K, DS_PROD, SOP_NONE);
    expect_out("MULLW", W, 8'h10, A_PRODL, D_PROD);
    // SETF-style constants
    apply(16'h6A40, 0, S1_ZERO, S2_FF, DS_NONE, SOP_NONE);
    expect_out("constants", 8'h00, 8'hFF, 12'h040, D_NONE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
