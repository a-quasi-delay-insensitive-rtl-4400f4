// tb_dr_or: 4-bit dual-rail OR gate. For random operand pairs it checks that the output stays
// null while only one operand is valid, becomes a|b one tick after both are valid, stays
// valid while one operand has already returned to null, and returns to null one tick after
// both are null.
module tb_dr_or;
  logic clk = 0, rst_n = 0;
  logic [3:0] a_t = 0, a_f = 0, b_t = 0, b_f = 0, z_t, z_f;
  int checks = 0, failures = 0;
  dr_or #(.W(4)) dut (.clk, .rst_n, .a_t, .a_f, .b_t, .b_f, .z_t, .z_f);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input string s, input logic [3:0] t, input logic [3:0] f);
    checks++;
    if (z_t !== t || z_f !== f) begin failures++; $display("%s: z=%b/%b expected %b/%b", s, z_t, z_f, t, f); end
  endtask
  initial begin
    logic [3:0] a, b;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      a = 4'($urandom); b = 4'($urandom);
      @(negedge clk); a_t = a; a_f = ~a;
      @(negedge clk); @(negedge clk); chk("one input valid", 0, 0);
      b_t = b; b_f = ~b;
      @(negedge clk); chk("both valid", a | b, ~(a | b));
      a_t = 0; a_f = 0;
      @(negedge clk); @(negedge clk); chk("hold", a | b, ~(a | b));
      b_t = 0; b_f = 0;
      @(negedge clk); chk("null", 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
