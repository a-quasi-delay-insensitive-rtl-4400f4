// tb_data_mem: writes random bytes (and some 16-bit wide writes) through the 4-phase write
// channel of the data memory, checking the acknowledge protocol, then reads every written
// location through the dual-rail read port and checks that the read data is null while the
// address is null.
module tb_data_mem;
  logic clk = 0, rst_n = 0, wack;
  logic [11:0] raddr_t = 0, raddr_f = 0, dbg_addr = 0;
  logic [7:0] rdata_t, rdata_f, dbg_data;
  logic [28:0] wreq_t = 0, wreq_f = 0;
  logic [7:0] model [4096];
  logic written [4096];
  int checks = 0, failures = 0;
  data_mem dut (.clk, .rst_n, .raddr_t, .raddr_f, .rdata_t, .rdata_f, .wreq_t, .wreq_f, .wack, .dbg_addr, .dbg_data);
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic wr(input logic wide, input logic [11:0] a, input logic [15:0] d);
    logic [28:0] w;
    w = {wide, a, d};
    @(negedge clk); wreq_t = w; wreq_f = ~w;
    while (!wack) @(negedge clk);
    wreq_t = 0; wreq_f = 0;
    while (wack) @(negedge clk);
    model[a] = d[7:0]; written[a] = 1;
    if (wide) begin model[12'(a + 1)] = d[15:8]; written[12'(a + 1)] = 1; end
  endtask
  initial begin
    foreach (written[i]) written[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) wr(1'($urandom_range(0, 4) == 0), 12'($urandom), 16'($urandom));
    #1; checks++; if (rdata_t !== 0 || rdata_f !== 0) begin failures++; $display("read data not null"); end
    for (int i = 0; i < 4096; i++) if (written[i]) begin
      raddr_t = 12'(i); raddr_f = ~12'(i); #1;
      checks++;
      if (rdata_t !== model[i] || rdata_f !== ~model[i]) begin failures++; $display("mem[%h] = %h expected %h", i, rdata_t, model[i]); end
      raddr_t = 0; raddr_f = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
