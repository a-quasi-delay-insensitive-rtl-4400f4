// tb_nctuac18_core: end-to-end test of the dual-rail core at its default sizes.
// Three programs are run, each from reset: a directed program that uses every implemented
// instruction class (loops with taken and not-taken branches, banked and remapped register
// accesses, MOVFF, multiply, rotates, bit operations, CALL/RCALL/RETURN, PUSH/POP, GOTO); a
// random program of several hundred instructions with forward conditional branches; and a
// program of random subroutines (nested CALL/RCALL/RETURN) called from counted backward
// loops. Each program also runs on the reference model in pic18_asm_pkg; at the end WREG, BSR, STATUS,
// STKPTR and the data memory are compared. The number of fetches must equal the number of
// executed instructions plus one extra fetch for each two-pass instruction (conditional
// branch, RETURN). Mechanism counters: first passes of Stall Control, taken and not-taken
// branches, each execution element (pass, ALU, rotate, multiply), the dual-rail OR path,
// each write-back channel (WREG, BSR, STATUS, STKPTR, memory, parallel flag update, return
// stack), remapped register sources and destinations in OF, and results that EX/WB had to
// hold back because OF had not yet emptied (the data-hazard rule). Each must occur at least
// once.
// Run with +trace to print every fetched PC (with its Stall bit) and every PC of the
// reference model, to locate the first divergence when a comparison fails.
module tb_nctuac18_core;
  import pic18_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ld_we = 0;
  logic [11:0] ld_addr = 0;
  logic [15:0] ld_data = 0;
  logic [20:0] dbg_pc;
  logic dbg_pc_valid, dbg_wb_ack, dbg_stall_pass;
  logic [7:0] dbg_wreg, dbg_bsr, dbg_status, dbg_stkptr, dbg_data;
  logic [11:0] dbg_addr = 0;
  logic [3:0] dbg_unit;
  int checks = 0, failures = 0, cycles = 0;
  int n_stall = 0, n_unit[4] = '{0, 0, 0, 0}, n_or = 0, n_taken = 0, n_nottaken = 0, n_fetch = 0;
  logic [3:0] unit_q = 0;
  logic pcv_q = 0, stall_q = 0;
  logic [20:0] halt_pc = '1;
  int first_halt = -1;

  nctuac18_core dut (.*);

  always #5 clk = ~clk;

  // watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycles++;
    unit_q <= dbg_unit;
    pcv_q <= dbg_pc_valid;
    stall_q <= dbg_stall_pass;
    for (int u = 0; u < 4; u++) if (dbg_unit[u] && !unit_q[u]) n_unit[u]++;
    if (dbg_pc_valid && !pcv_q) begin
      if ($test$plusargs("trace")) $display("DUT %h s=%b", dbg_pc, dut.pc_t[21]);
      if (dbg_pc == halt_pc && first_halt < 0) first_halt = n_fetch;
      n_fetch++;
    end
    if (dbg_stall_pass && !stall_q) n_stall++;
  end
  always @(posedge clk) if (dut.u_exwb.u_alu.or_ok && !$past(dut.u_exwb.u_alu.or_ok)) n_or++;

  // write-back channels, register remapping in OF, and write-backs held until OF is empty
  localparam int NEV = 10;
  localparam string EV_NAME [NEV] = '{"WREG write", "BSR write", "STATUS write", "STKPTR write",
    "memory write", "flag update", "return-stack write", "remapped source", "remapped destination",
    "write-back held for OF"};
  logic [NEV-1:0] ev, ev_q = '0;
  int n_ev [NEV];
  initial foreach (n_ev[i]) n_ev[i] = 0;
  always_comb begin
    logic remap_src, remap_dst;
    remap_src = dut.u_of.src inside {12'hFE8, 12'hFE0, 12'hFD8, 12'hFFC};
    remap_dst = dut.u_of.dst inside {12'hFE8, 12'hFE0, 12'hFD8, 12'hFFC};
    ev[0] = dut.u_exwb.to_w;
    ev[1] = dut.u_exwb.to_b;
    ev[2] = dut.u_exwb.to_s;
    ev[3] = dut.u_exwb.to_p;
    ev[4] = dut.u_exwb.to_m;
    ev[5] = dut.u_exwb.to_fl;
    ev[6] = dut.u_exwb.to_stk;
    ev[7] = dut.u_of.ok && remap_src &&
            (dut.u_of.c.s1sel == nctu_pkg::S1_F || dut.u_of.c.s2sel == nctu_pkg::S2_F);
    ev[8] = dut.u_of.ok && remap_dst && dut.u_of.c.dsel == nctu_pkg::DS_F;
    ev[9] = dut.u_exwb.res_ok && dut.u_exwb.of_busy;
  end
  always @(posedge clk) begin
    ev_q <= ev;
    for (int i = 0; i < NEV; i++) if (ev[i] && !ev_q[i]) n_ev[i]++;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("MISMATCH %s: got %h expected %h", what, got, exp);
    end
  endtask

  // load program and data into DUT and model, run to the halt loop, compare
  task automatic run(input iss m, input int nwords, input logic [20:0] halt, input string name);
    int t0, fetches;
    rst_n = 0;
    repeat (3) @(posedge clk);
    for (int i = 0; i < nwords + 2; i++) begin
      ld_we <= 1; ld_addr <= 12'(i); ld_data <= m.pm[i];
      @(posedge clk);
    end
    ld_we <= 0;
    for (int i = 0; i < 4096; i++) dut.u_dmem.mem[i] = m.dm[i];
    @(posedge clk);
    // reference run
    while (m.pc != halt) begin
      if ($test$plusargs("trace")) $display("ISS %h w=%h st=%h", m.pc, m.w, m.status);
      m.step();
      if (m.n_exec > 100000) break;
    end
    n_taken += m.n_taken; n_nottaken += m.n_nottaken;
    // DUT run
    n_fetch = 1;          // the reset token is the first fetch
    halt_pc = halt;
    first_halt = -1;
    rst_n = 1;
    t0 = cycles;
    while (cycles - t0 < 2_000_000) begin
      @(posedge clk);
      if (first_halt >= 0 && n_fetch >= first_halt + 3) break;
    end
    fetches = first_halt;
    repeat (50) @(posedge clk);
    $display("%s: %0d program words, %0d instructions, %0d fetches, %0d cycles", name, nwords, m.n_exec, fetches, cycles - t0);
    check({name, " fetch count"}, 32'(fetches), 32'(m.n_exec + m.n_twopass));
    check({name, " WREG"}, 32'(dbg_wreg), 32'(m.w));
    check({name, " BSR"}, 32'(dbg_bsr), 32'(m.bsr));
    check({name, " STATUS"}, {27'd0, dbg_status[4:0]}, {27'd0, m.status[4:0]});
    check({name, " STKPTR"}, 32'(dbg_stkptr), 32'(m.stkptr));
    for (int i = 0; i < 4096; i++) begin
      dbg_addr = 12'(i);
      #0;
      if (i < 'hF80 || i == 'hFF3 || i == 'hFF4) begin
        if (dbg_data !== m.dm[i]) check($sformatf("%s mem[%h]", name, i), 32'(dbg_data), 32'(m.dm[i]));
      end
    end
    checks++;
  endtask

  // append one random instruction (conditional forward branches only if with_branch)
  task automatic gen_rand(ref logic [15:0] p [$], input bit with_branch);
    logic [7:0] f;
    int k;
    k = $urandom_range(0, 15);
    case ($urandom_range(0, 3))
      0: f = 8'hE8;                          // WREG through its file address
      1: f = 8'hD8;                          // STATUS through its file address
      default: f = 8'($urandom_range(0, 15));
    endcase
    case (k)
      0, 1, 2, 3: begin
        logic [5:0] ops [16] = '{ADDWF, ADDWFC, ANDWF, COMF, DECF, INCF, IORWF, MOVF,
                                 RLCF, RLNCF, RRCF, RRNCF, SUBFWB, SUBWF, SUBWFB, XORWF};
        p.push_back(bo(ops[$urandom_range(0, 15)], 1'($urandom), 1'($urandom), f));
      end
      4: begin
        logic [6:0] ops7 [5] = '{CLRF, MOVWF, MULWF, NEGF, SETF};
        p.push_back(fa7(ops7[$urandom_range(0, 4)], 1'($urandom), f));
      end
      5: begin
        logic [3:0] ob [3] = '{BCF, BSF, BTG};
        p.push_back(bb(ob[$urandom_range(0, 2)], 3'($urandom), 1'($urandom), f));
      end
      6, 7, 8: begin
        logic [7:0] ol [7] = '{ADDLW, ANDLW, IORLW, MOVLW, MULLW, SUBLW, XORLW};
        p.push_back(lit(ol[$urandom_range(0, 6)], 8'($urandom)));
      end
      9: p.push_back(movlb(4'($urandom_range(0, 3))));
      10, 11: if (with_branch) p.push_back(bcc(3'($urandom), 8'($urandom_range(0, 2))));
              else p.push_back(lit(ADDLW, 8'($urandom)));
      12: begin p.push_back({4'hC, 4'h0, 8'($urandom_range(0, 15))}); p.push_back({4'hF, 4'h0, 8'($urandom_range(0, 15))}); end
      13: begin p.push_back(PUSH); p.push_back(POP); end
      default: p.push_back(bo(ADDWF, 1'($urandom), 0, f));
    endcase
  endtask

  initial begin
    iss m;
    int n;
    logic [15:0] p [$];
    // ---------------- directed program ----------------
    m = new();
    p = {};
    p.push_back(lit(MOVLW, 8'h05));
    p.push_back(fa7(MOVWF, 0, 8'h10));
    p.push_back(fa7(CLRF, 0, 8'h11));
    // loop (word 3)
    p.push_back(bo(MOVF, 0, 0, 8'h10));
    p.push_back(bo(ADDWF, 1, 0, 8'h11));
    p.push_back(bo(DECF, 1, 0, 8'h10));
    p.push_back(bcc(3'd1, 8'hFC));            // BNZ loop (-4 words)
    p.push_back(lit(MOVLW, 8'h7F));
    p.push_back(lit(ADDLW, 8'h01));           // OV, N set
    p.push_back(bcc(3'd4, 8'h01));            // BOV +1 taken
    p.push_back(lit(MOVLW, 8'hEE));           // skipped
    p.push_back(bcc(3'd7, 8'h01));            // BNN not taken
    p.push_back(lit(MULLW, 8'h03));
    p.push_back({4'hC, 12'hFF3}); p.push_back({4'hF, 12'h012});   // MOVFF PRODL -> 0x12
    p.push_back(movlb(4'h2));
    p.push_back(fa7(MOVWF, 1, 8'h20));        // [0x220] = W
    p.push_back(bo(RLCF, 0, 1, 8'h20));
    p.push_back(bo(RRNCF, 1, 0, 8'h11));
    p.push_back(bb(BSF, 3'd3, 0, 8'h11));
    p.push_back(bb(BCF, 3'd0, 0, 8'h11));
    p.push_back(bb(BTG, 3'd7, 0, 8'h12));
    p.push_back(bo(IORWF, 0, 0, 8'h12));
    p.push_back(lit(XORLW, 8'h5A));
    p.push_back(lit(ANDLW, 8'hF0));
    p.push_back(lit(IORLW, 8'h01));
    p.push_back(lit(SUBLW, 8'h10));
    p.push_back(bo(SUBWF, 0, 0, 8'h11));
    p.push_back(bo(COMF, 1, 0, 8'h12));
    p.push_back(fa7(NEGF, 0, 8'h12));
    p.push_back(bo(INCF, 1, 0, 8'h12));
    p.push_back(fa7(SETF, 0, 8'h13));
    p.push_back(bo(SUBFWB, 0, 0, 8'h13));
    p.push_back(bo(SUBWFB, 1, 0, 8'h11));
    p.push_back(bo(ADDWFC, 0, 0, 8'h11));
    p.push_back(bo(RLNCF, 1, 0, 8'h11));
    p.push_back(bo(RRCF, 1, 0, 8'h11));
    p.push_back(fa7(MULWF, 0, 8'h11));
    p.push_back(bo(ANDWF, 1, 0, 8'h13));
    p.push_back(bo(XORWF, 1, 0, 8'h13));
    p.push_back({4'hC, 12'h011}); p.push_back({4'hF, 12'hFE8});   // MOVFF 0x11 -> WREG
    p.push_back({4'hC, 12'hFD8}); p.push_back({4'hF, 12'h014});   // MOVFF STATUS -> 0x14
    n = p.size();
    // CALL sub ; RCALL sub ; PUSH ; POP ; GOTO end
    p.push_back({8'hEC, 8'((n + 8) & 8'hFF)}); p.push_back({4'hF, 12'((n + 8) >> 8)});
    p.push_back(rcall(11'(8 - 2 - 1)));       // at n+2, target n+8
    p.push_back(PUSH);
    p.push_back(POP);
    p.push_back({8'hEF, 8'((n + 11) & 8'hFF)}); p.push_back({4'hF, 12'((n + 11) >> 8)});
    p.push_back(NOP);
    // sub at n+8
    p.push_back(bo(INCF, 1, 0, 8'h15));
    p.push_back(bo(ADDWF, 1, 0, 8'h15));
    p.push_back(RETURN);
    // end at n+11
    p.push_back(fa7(CLRF, 0, 8'h16));
    p.push_back(bcc(3'd0, 8'h00));            // BZ +0 taken
    p.push_back(bcc(3'd2, 8'h00));            // BC +0
    p.push_back(bcc(3'd3, 8'h00));            // BNC +0
    p.push_back(bcc(3'd5, 8'h00));            // BNOV +0
    p.push_back(bcc(3'd6, 8'h00));            // BN +0
    p.push_back(bra(11'h7FF));                // halt: BRA $
    foreach (m.pm[i]) m.pm[i] = 16'h0000;
    foreach (p[i]) m.pm[i] = p[i];
    foreach (m.dm[i]) m.dm[i] = 8'($urandom);
    run(m, p.size(), 21'((p.size() - 1) * 2), "directed");

    // ---------------- random program ----------------
    m = new();
    p = {};
    for (int i = 0; i < 400; i++) gen_rand(p, 1'b1);
    p.push_back(NOP); p.push_back(NOP); p.push_back(NOP);
    p.push_back(bra(11'h7FF));
    foreach (m.pm[i]) m.pm[i] = 16'h0000;
    foreach (p[i]) m.pm[i] = p[i];
    foreach (m.dm[i]) m.dm[i] = 8'($urandom);
    run(m, p.size(), 21'((p.size() - 1) * 2), "random");

    // ---------------- random subroutines and loops ----------------
    // GOTO main; NSUB subroutines of random code, each may call an earlier one (nesting);
    // main runs counted backward loops whose bodies call the subroutines.
    m = new();
    p = {};
    begin
      localparam int NSUB = 6;
      int sub_at [NSUB];
      int here, tgt;
      p.push_back(NOP); p.push_back(NOP);        // GOTO main, patched below
      for (int j = 0; j < NSUB; j++) begin
        sub_at[j] = p.size();
        for (int i = 0; i < 6; i++) gen_rand(p, 1'b0);
        if (j > 0) begin
          tgt = sub_at[$urandom_range(0, j - 1)];
          if ($urandom_range(0, 1) == 0) begin
            p.push_back({8'hEC, 8'(tgt)}); p.push_back({4'hF, 12'(tgt >> 8)});
          end else begin
            here = p.size();
            p.push_back(rcall(11'(tgt - here - 1)));
          end
        end
        p.push_back(RETURN);
      end
      p[0] = {8'hEF, 8'(p.size())}; p[1] = {4'hF, 12'(p.size() >> 8)};
      for (int l = 0; l < 4; l++) begin
        int top;
        p.push_back(lit(MOVLW, 8'($urandom_range(2, 4))));
        p.push_back(fa7(MOVWF, 0, 8'h30));
        top = p.size();
        for (int i = 0; i < 8; i++) begin
          gen_rand(p, 1'b0);
          if ($urandom_range(0, 3) == 0) begin
            tgt = sub_at[$urandom_range(0, NSUB - 1)];
            p.push_back({8'hEC, 8'(tgt)}); p.push_back({4'hF, 12'(tgt >> 8)});
          end
        end
        p.push_back(bo(DECF, 1, 0, 8'h30));
        here = p.size();
        p.push_back(bcc(3'd1, 8'(top - here - 1)));   // BNZ top
      end
    end
    p.push_back(NOP); p.push_back(NOP); p.push_back(NOP);
    p.push_back(bra(11'h7FF));
    foreach (m.pm[i]) m.pm[i] = 16'h0000;
    foreach (p[i]) m.pm[i] = p[i];
    foreach (m.dm[i]) m.dm[i] = 8'($urandom);
    run(m, p.size(), 21'((p.size() - 1) * 2), "calls and loops");

    // ---------------- mechanisms seen ----------------
    $display("stall first passes %0d, taken %0d, not taken %0d, pass %0d alu %0d rot %0d mul %0d, dual-rail OR %0d",
             n_stall, n_taken, n_nottaken, n_unit[0], n_unit[1], n_unit[2], n_unit[3], n_or);
    checks++; if (n_stall == 0) begin failures++; $display("no stall pass"); end
    checks++; if (n_taken == 0 || n_nottaken == 0) begin failures++; $display("branch outcomes missing"); end
    for (int u = 0; u < 4; u++) begin checks++; if (n_unit[u] == 0) begin failures++; $display("unit %0d unused", u); end end
    checks++; if (n_or == 0) begin failures++; $display("OR path unused"); end
    for (int i = 0; i < NEV; i++) begin
      $display("%s: %0d", EV_NAME[i], n_ev[i]);
      checks++; if (n_ev[i] == 0) begin failures++; $display("%s never happened", EV_NAME[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
