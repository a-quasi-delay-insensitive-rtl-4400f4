// tb_ex_alu: random operands and operations on the ALU execution element. Results and
// flags are compared with an integer reference (PIC18 rules: C and DC are "no borrow" for
// subtraction, OV is signed overflow). The dual-rail OR path must deliver its result one
// tick after the input, the other operations in the same tick; the output must be null
// while the input is null.
module tb_ex_alu;
  import nctu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [26:0] in_t = 0, in_f = 0;
  logic [20:0] out_t, out_f;
  int checks = 0, failures = 0;
  ex_alu dut (.clk, .rst_n, .in_t, .in_f, .out_t, .out_f);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [2:0] op; logic [7:0] a, b, st, r; logic [4:0] fl;
    int full, lo, sres, c, lat, ia, ib, sa, sb;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      op = 3'($urandom); a = 8'($urandom); b = 8'($urandom); st = 8'($urandom) & 8'h1F;
      fl = st[4:0];
      ia = int'(a); ib = int'(b); sa = int'($signed(a)); sb = int'($signed(b));
      c = int'(st[0]);
      case (op)
        OP_ADD, OP_ADDC: begin
          if (op == OP_ADD) c = 0;
          full = ia + ib + c; lo = ia % 16 + ib % 16 + c; sres = sa + sb + c;
          fl[0] = full > 255; fl[1] = lo > 15;
        end
        OP_SUB, OP_SUBB: begin
          c = (op == OP_SUB) ? 0 : int'(!st[0]);
          full = ia - ib - c; lo = ia % 16 - ib % 16 - c; sres = sa - sb - c;
          fl[0] = full >= 0; fl[1] = lo >= 0;
        end
        OP_AND: full = ia & ib;
        OP_IOR: full = ia | ib;
        OP_XOR: full = ia ^ ib;
        default: full = ia;
      endcase
      r = full[7:0];
      if (op inside {OP_ADD, OP_ADDC, OP_SUB, OP_SUBB}) fl[3] = (sres > 127 || sres < -128);
      fl[2] = (r == 0); fl[4] = r[7];
      @(negedge clk);
      in_t = {op, st, b, a}; in_f = ~in_t;
      lat = 0;
      #1;
      while (!(&(out_t | out_f))) begin @(negedge clk); #1; lat++; if (lat > 5) break; end
      checks++;
      if (out_t !== {fl, 8'h00, r} || out_f !== ~out_t) begin
        failures++; $display("op %0d %h %h st %h: got %h expected %h", op, a, b, st, out_t, {fl, 8'h00, r});
      end
      checks++;
      if (lat != ((op == OP_IOR) ? 1 : 0)) begin failures++; $display("op %0d latency %0d", op, lat); end
      in_t = 0; in_f = 0;
      repeat (2) @(negedge clk);
      checks++; if (out_t !== 0 || out_f !== 0) begin failures++; $display("output not null"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
