// tb_reg_file: writes each of WREG, BSR, STATUS and STKPTR through its own 4-phase write
// channel and the return stack through its channel, then checks the dual-rail reads: all
// four registers with the operand-fetch read, STATUS and the stack entry selected by STKPTR
// with the decode read, and null outputs with no read requested.
module tb_reg_file;
  import nctu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] w_t [4], w_f [4];
  logic ack [4];
  logic [PCW+4:0] stk_t = 0, stk_f = 0;
  logic stk_ack, rd_of = 0, rd_id = 0;
  logic [7:0] r_t [4], r_f [4], q [4];
  logic [PCW-1:0] tos_t, tos_f;
  logic [7:0] model [4];
  logic [PCW-1:0] smodel [32];
  int checks = 0, failures = 0;
  reg_file dut (.clk, .rst_n,
    .wreg_t(w_t[0]), .wreg_f(w_f[0]), .wreg_ack(ack[0]), .bsr_t(w_t[1]), .bsr_f(w_f[1]), .bsr_ack(ack[1]),
    .status_t(w_t[2]), .status_f(w_f[2]), .status_ack(ack[2]), .stkptr_t(w_t[3]), .stkptr_f(w_f[3]), .stkptr_ack(ack[3]),
    .stk_t, .stk_f, .stk_ack, .rd_of, .rd_id,
    .wreg_rt(r_t[0]), .wreg_rf(r_f[0]), .bsr_rt(r_t[1]), .bsr_rf(r_f[1]), .status_rt(r_t[2]), .status_rf(r_f[2]),
    .stkptr_rt(r_t[3]), .stkptr_rf(r_f[3]), .tos_t, .tos_f,
    .wreg_q(q[0]), .bsr_q(q[1]), .status_q(q[2]), .stkptr_q(q[3]));
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic wr(input int r, input logic [7:0] v);
    @(negedge clk); w_t[r] = v; w_f[r] = ~v;
    while (!ack[r]) @(negedge clk);
    w_t[r] = 0; w_f[r] = 0;
    while (ack[r]) @(negedge clk);
    model[r] = v;
  endtask
  task automatic push(input logic [4:0] idx, input logic [PCW-1:0] a);
    @(negedge clk); stk_t = {idx, a}; stk_f = ~{idx, a};
    while (!stk_ack) @(negedge clk);
    stk_t = 0; stk_f = 0;
    while (stk_ack) @(negedge clk);
    smodel[idx] = a;
  endtask
  initial begin
    for (int r = 0; r < 4; r++) begin w_t[r] = 0; w_f[r] = 0; model[r] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 1; i < 32; i++) push(5'(i), PCW'($urandom));
    for (int i = 0; i < 60; i++) begin
      int r;
      r = $urandom_range(0, 3);
      wr(r, (r == 3) ? 8'($urandom_range(1, 31)) : 8'($urandom));
      rd_of = 0; rd_id = 0; #1;
      checks++; if (r_t[r] !== 0 || r_f[r] !== 0 || tos_t !== 0) begin failures++; $display("outputs not null"); end
      rd_of = 1; #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (r_t[k] !== model[k] || r_f[k] !== ~model[k]) begin failures++; $display("reg %0d = %h expected %h", k, r_t[k], model[k]); end
      end
      rd_of = 0; rd_id = 1; #1;
      checks++;
      if (r_t[2] !== model[2] || (model[3] != 0 && tos_t !== smodel[model[3][4:0]]) || (tos_t | tos_f) !== '1) begin
        failures++; $display("decode read: status %h tos %h", r_t[2], tos_t);
      end
      rd_id = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
