// tb_if_stage: drives PC tokens {stall, pc} into the fetch stage with a program memory
// modelled in the testbench (word i holds i * 16'h9E37 ^ 16'h1234) and checks the emitted
// {stall, pc, w1, w0} word, the Read signal, and the null output for a null or incomplete PC.
module tb_if_stage;
  import nctu_pkg::*;
  logic [PCW:0] pc_t = 0, pc_f = 0;
  logic [11:0] imem_addr;
  logic [15:0] imem_w0, imem_w1;
  logic [PCW+32:0] out_t, out_f, e;
  logic read;
  int checks = 0, failures = 0;
  if_stage #(.AW(12)) dut (.pc_t, .pc_f, .imem_addr, .imem_w0, .imem_w1, .out_t, .out_f, .read);
  function automatic logic [15:0] word(input logic [11:0] i); return 16'(i * 16'h9E37) ^ 16'h1234; endfunction
  assign imem_w0 = word(imem_addr);
  assign imem_w1 = word(imem_addr + 1);
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #1; checks++; if (read || out_t !== 0 || out_f !== 0) begin failures++; $display("null PC gives output"); end
    for (int i = 0; i < 200; i++) begin
      logic [PCW:0] p;
      p = {1'($urandom), 9'd0, 11'($urandom), 1'b0};
      pc_t = p; pc_f = ~p; pc_t[3] = 0; pc_f[3] = 0; #1;
      checks++; if (read || out_t !== 0) begin failures++; $display("incomplete PC gives output"); end
      pc_t = p; pc_f = ~p; #1;
      e = {p, word(p[12:1] + 1), word(p[12:1])};
      checks++;
      if (!read || out_t !== e || out_f !== ~e) begin failures++; $display("pc %h: out %h expected %h", p, out_t, e); end
      pc_t = 0; pc_f = 0; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
