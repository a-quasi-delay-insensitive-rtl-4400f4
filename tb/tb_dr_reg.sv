// tb_dr_reg: 8-bit dual-rail register. Random values are written with the 4-phase write
// handshake (valid word, wait for ack, null, wait for ack to fall); after each write the
// value is read back through the read gate, the null input is checked to leave the value
// unchanged, and dout is checked to be null while read is low.
module tb_dr_reg;
  logic clk = 0, rst_n = 0, ack, read = 0;
  logic [7:0] din_t = 0, din_f = 0, dout_t, dout_f, q;
  int checks = 0, failures = 0;
  dr_reg #(.W(8), .RST_VAL(8'h5A)) dut (.clk, .rst_n, .din_t, .din_f, .ack, .read, .dout_t, .dout_f, .q);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] v, prev;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); read = 1; #1;
    checks++; if (dout_t !== 8'h5A || dout_f !== 8'hA5) begin failures++; $display("reset value"); end
    prev = 8'h5A;
    for (int i = 0; i < 100; i++) begin
      v = 8'($urandom);
      @(negedge clk); read = 0; din_t = v; din_f = ~v;
      #1; checks++; if (dout_t !== 0 || dout_f !== 0) begin failures++; $display("dout not null without read"); end
      while (!ack) @(negedge clk);
      din_t = 0; din_f = 0;
      while (ack) @(negedge clk);
      repeat (2) @(negedge clk);
      read = 1; #1;
      checks++;
      if (dout_t !== v || dout_f !== ~v) begin failures++; $display("read %h expected %h (previous %h)", dout_t, v, prev); end
      prev = v;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
