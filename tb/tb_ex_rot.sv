// tb_ex_rot: all operands for each of the four rotates, with carry in 0 and 1, checked
// against a reference built from bit slices; flags C, Z, N (C kept for the non-carry forms).
module tb_ex_rot;
  import nctu_pkg::*;
  logic [26:0] in_t = 0, in_f = 0;
  logic [20:0] out_t, out_f;
  int checks = 0, failures = 0;
  ex_rot dut (.in_t, .in_f, .out_t, .out_f);
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] st, r; logic co;
    #1; checks++; if (out_t !== 0 || out_f !== 0) begin failures++; $display("output without input"); end
    for (int op = 0; op < 4; op++)
      for (int ci = 0; ci < 2; ci++)
        for (int v = 0; v < 256; v++) begin
          st = {3'b0, 1'b1, 1'b0, 1'b0, 1'b1, 1'(ci)};   // N=1, OV=0, Z=0, DC=1, C=ci
          case (op)
            0: begin r = {8'(v) << 1} | 8'(ci);          co = v[7]; end
            1: begin r = (8'(v) << 1) | 8'(v >> 7);      co = 1'(ci); end
            2: begin r = (8'(v) >> 1) | {1'(ci), 7'd0};  co = v[0]; end
            default: begin r = (8'(v) >> 1) | {v[0], 7'd0}; co = 1'(ci); end
          endcase
          in_t = {3'(op), st, 8'h00, 8'(v)}; in_f = ~in_t; #1;
          checks++;
          if (out_t !== {r[7], 1'b0, r == 0, 1'b1, co, 8'h00, r} || out_f !== ~out_t) begin
            failures++; $display("op %0d c %0d v %h: got %h", op, ci, v, out_t);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
