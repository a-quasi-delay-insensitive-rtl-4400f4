// tb_c_element: random stimulus on a two-input C-element (reset value 0) and a second one
// with reset value 1; the output is compared every tick with a reference that copies the
// inputs when they agree and keeps its value otherwise, one tick later.
module tb_c_element;
  logic clk = 0, rst_n = 0, a = 0, b = 0, y0, y1, ref0, ref1;
  int checks = 0, failures = 0;
  c_element #(.RST_VAL(1'b0)) dut0 (.clk, .rst_n, .a, .b, .y(y0));
  c_element #(.RST_VAL(1'b1)) dut1 (.clk, .rst_n, .a, .b, .y(y1));
  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(posedge clk); #1;   // reset has been applied by the first edge
    checks++; if (y0 !== 1'b0 || y1 !== 1'b1) begin failures++; $display("reset values wrong"); end
    ref0 = 0; ref1 = 1;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      a = 1'($urandom); b = 1'($urandom);
      @(posedge clk);
      if (a == b) begin ref0 = a; ref1 = a; end
      #1;
      checks++;
      if (y0 !== ref0 || y1 !== ref1) begin failures++; $display("a=%b b=%b y=%b/%b ref=%b/%b", a, b, y0, y1, ref0, ref1); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
