// tb_id_stage: applies IF/ID tokens to the decode stage and checks the next-PC token and
// selected decoded fields against values worked out by hand from the PIC18 encodings:
// sequential and two-word instructions, BRA, GOTO, CALL (push, return address pc+4), both
// passes of a conditional branch for taken and not-taken STATUS values, and both passes of
// RETURN with a top-of-stack value. Also checks that nothing is emitted while the input or
// the STATUS read is incomplete.
module tb_id_stage;
  import nctu_pkg::*;
  logic [PCW+32:0] in_t = 0, in_f = 0;
  logic rd, stall_pass;
  logic [7:0] status_t = 0, status_f = 0;
  logic [PCW-1:0] tos_t = 0, tos_f = 0;
  logic [PCW:0] npc_t, npc_f;
  logic [IDOF_W-1:0] idof_t_o, idof_f_o;
  idof_t d;
  int checks = 0, failures = 0;
  id_stage dut (.in_t, .in_f, .rd, .status_t, .status_f, .tos_t, .tos_f, .npc_t, .npc_f, .idof_t_o, .idof_f_o, .stall_pass);
  assign d = idof_t'(idof_t_o);

  task automatic apply(input logic st, input logic [PCW-1:0] pc, input logic [15:0] w0, input logic [15:0] w1,
                       input logic [7:0] status, input logic [PCW-1:0] tos);
    in_t = {st, pc, w1, w0}; in_f = ~in_t;
    #1;
    status_t = rd ? status : 8'h00; status_f = rd ? ~status : 8'h00;
    tos_t = rd ? tos : '0; tos_f = rd ? ~tos : '0;
    #1;
  endtask
  task automatic expect_npc(input string s, input logic st, input logic [PCW-1:0] npc);
    checks++;
    if (npc_t !== {st, npc} || npc_f !== ~{st, npc}) begin
      failures++; $display("%s: npc %h expected %h", s, npc_t, {st, npc});
    end
  endtask
  task automatic idle();
    in_t = 0; in_f = 0; #1; status_t = 0; status_f = 0; tos_t = 0; tos_f = 0; #1;
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #1;
    checks++; if (npc_t !== 0 || npc_f !== 0 || idof_t_o !== 0 || rd) begin failures++; $display("output without input"); end
    // incomplete STATUS read holds the output back
    in_t = {1'b0, 21'h100, 16'h0, 16'h2612}; in_f = ~in_t; #1;
    checks++; if (npc_t !== 0 || npc_f !== 0) begin failures++; $display("output before STATUS read"); end
    idle();
    // ADDWF 0x12,F at 0x100
    apply(0, 21'h100, 16'h2612, 16'h0, 8'h00, 21'h0);
    expect_npc("ADDWF", 0, 21'h102);
    checks++; if (d.fcode != FC_ALU || d.op != OP_ADD || d.dsel != DS_F || d.fmask != 5'h1F || d.s2sel != S2_W)
      begin failures++; $display("ADDWF decode"); end
    idle();
    // MOVFF is two words
    apply(0, 21'h100, 16'hC012, 16'hF034, 8'h00, 21'h0);
    expect_npc("MOVFF", 0, 21'h104);
    checks++; if (d.dsel != DS_MOVFF || d.w1 != 16'hF034) begin failures++; $display("MOVFF decode"); end
    idle();
    // BRA -3 words at 0x200 : 0x200 + 2 - 6
    apply(0, 21'h200, 16'hD7FD, 16'h0, 8'h00, 21'h0);
    expect_npc("BRA", 0, 21'h1FC);
    idle();
    // GOTO 0x12345 (word address 0x091A2)
    apply(0, 21'h200, 16'hEFA2, 16'hF091, 8'h00, 21'h0);
    expect_npc("GOTO", 0, 21'h12344);
    idle();
    // CALL
    apply(0, 21'h200, 16'hEC10, 16'hF000, 8'h00, 21'h0);
    expect_npc("CALL", 0, 21'h020);
    checks++; if (d.sop != SOP_PUSH || d.ret != 21'h204) begin failures++; $display("CALL decode"); end
    idle();
    // BZ +5 at 0x300, first pass: same pc, stall bit set, no-op down the pipe
    apply(0, 21'h300, 16'hE005, 16'h0, 8'h04, 21'h0);
    expect_npc("BZ first pass", 1, 21'h300);
    checks++; if (d.dsel != DS_NONE || d.fmask != 0 || d.sop != SOP_NONE || !stall_pass) begin failures++; $display("BZ first pass no-op"); end
    idle();
    // second pass, Z = 1: taken to 0x300 + 2 + 10
    apply(1, 21'h300, 16'hE005, 16'h0, 8'h04, 21'h0);
    expect_npc("BZ taken", 0, 21'h30C);
    checks++; if (stall_pass) begin failures++; $display("stall_pass on second pass"); end
    idle();
    // second pass, Z = 0: not taken
    apply(1, 21'h300, 16'hE005, 16'h0, 8'h00, 21'h0);
    expect_npc("BZ not taken", 0, 21'h302);
    idle();
    // BNC -2 with C = 0: taken backwards
    apply(1, 21'h300, 16'hE3FE, 16'h0, 8'h00, 21'h0);
    expect_npc("BNC taken", 0, 21'h2FE);
    idle();
    // BN with N = 1, BNOV with OV = 1 (not taken)
    apply(1, 21'h300, 16'hE602, 16'h0, 8'h10, 21'h0);
    expect_npc("BN taken", 0, 21'h306);
    idle();
    apply(1, 21'h300, 16'hE502, 16'h0, 8'h08, 21'h0);
    expect_npc("BNOV not taken", 0, 21'h302);
    idle();
    // RETURN: first pass repeats, second goes to top of stack and pops
    apply(0, 21'h400, 16'h0012, 16'h0, 8'h00, 21'h0ABCE);
    expect_npc("RETURN first", 1, 21'h400);
    idle();
    apply(1, 21'h400, 16'h0012, 16'h0, 8'h00, 21'h0ABCE);
    expect_npc("RETURN second", 0, 21'h0ABCE);
    checks++; if (d.sop != SOP_POP || d.op != OP_SUB) begin failures++; $display("RETURN decode"); end
    idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
