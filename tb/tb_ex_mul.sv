// tb_ex_mul: random 8 x 8 products (plus the corner cases 0 and FF) checked against the
// integer product; STATUS flags must pass through unchanged; null input gives null output.
module tb_ex_mul;
  logic [26:0] in_t = 0, in_f = 0;
  logic [20:0] out_t, out_f;
  int checks = 0, failures = 0;
  ex_mul dut (.in_t, .in_f, .out_t, .out_f);
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] a, b, st; int p;
    #1; checks++; if (out_t !== 0 || out_f !== 0) begin failures++; $display("output without input"); end
    for (int i = 0; i < 1000; i++) begin
      a = (i == 0) ? 8'hFF : 8'($urandom); b = (i == 0) ? 8'hFF : (i == 1) ? 8'h00 : 8'($urandom);
      st = 8'($urandom);
      p = a * b;
      in_t = {3'd0, st, b, a}; in_f = ~in_t; #1;
      checks++;
      if (out_t !== {st[4:0], 16'(p)} || out_f !== ~out_t) begin failures++; $display("%h * %h = %h", a, b, out_t); end
      in_t = 0; in_f = 0; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
