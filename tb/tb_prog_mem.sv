// tb_prog_mem: loads random words into a 256-word program memory through the load port and
// reads them back in pairs (word at raddr and at raddr+1, wrapping at the top).
module tb_prog_mem;
  logic clk = 0, ld_we = 0;
  logic [7:0] ld_addr = 0, raddr = 0;
  logic [15:0] ld_data = 0, rdata0, rdata1;
  logic [15:0] img [256];
  int checks = 0, failures = 0;
  prog_mem #(.WORDS(256)) dut (.clk, .ld_we, .ld_addr, .ld_data, .raddr, .rdata0, .rdata1);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    foreach (img[i]) img[i] = 16'($urandom);
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); ld_we = 1; ld_addr = 8'(i); ld_data = img[i];
    end
    @(negedge clk); ld_we = 0;
    for (int i = 0; i < 256; i++) begin
      raddr = 8'(i); #1;
      checks++;
      if (rdata0 !== img[i] || rdata1 !== img[(i + 1) % 256]) begin failures++; $display("addr %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
