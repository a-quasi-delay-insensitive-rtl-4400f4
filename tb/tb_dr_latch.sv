// tb_dr_latch: four 8-bit dual-rail latches in a chain, fed by a 4-phase producer and drained
// by a 4-phase consumer that answers after a random delay. Checks: every word arrives, in
// order and unchanged; two different data items never sit in adjacent latches (a valid item
// is always followed by a null stage); a stored bit is never (1,1) (assertion inside the
// latch); the first item reaches the output after the chain's latency (one tick per latch
// plus the completion detectors), counted from the cycle it was offered.
module tb_dr_latch;
  localparam int N = 4, W = 8;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] d_t [N+1], d_f [N+1];
  logic ack [N+1];
  logic cons_ack = 0;
  int checks = 0, failures = 0, adjacent_same = 0;
  logic [W-1:0] sent [$];
  for (genvar k = 0; k < N; k++) begin : g
    dr_latch #(.W(W)) u (.clk, .rst_n, .in_t(d_t[k]), .in_f(d_f[k]), .ack_out(ack[k]),
                         .out_t(d_t[k+1]), .out_f(d_f[k+1]), .ack_in(k == N-1 ? cons_ack : ack[k+1]));
  end
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // separation of different items
  always @(posedge clk) if (rst_n)
    for (int k = 1; k < N; k++)
      if (&(d_t[k] | d_f[k]) && &(d_t[k+1] | d_f[k+1])) begin
        if (d_t[k] != d_t[k+1]) begin failures++; $display("two items adjacent at stage %0d", k); end
        else adjacent_same++;
      end
  // producer
  initial begin
    int t_start, t_first;
    d_t[0] = 0; d_f[0] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 40; i++) begin
      logic [W-1:0] v;
      v = W'($urandom);
      sent.push_back(v);
      d_t[0] = v; d_f[0] = ~v;
      while (!ack[0]) @(negedge clk);
      d_t[0] = 0; d_f[0] = 0;
      while (ack[0]) @(negedge clk);
    end
  end
  // consumer and latency
  initial begin
    int n, t0, t1;
    n = 0;
    @(posedge rst_n);
    t0 = 0; t1 = 0;
    fork
      begin while (!(&(d_t[0] | d_f[0]))) begin @(posedge clk); t0++; end end
      begin while (!(&(d_t[N] | d_f[N]))) begin @(posedge clk); t1++; end end
    join
    checks++;
    if (t1 - t0 != N) begin failures++; $display("latency %0d ticks, expected %0d", t1 - t0, N); end
    while (n < 40) begin
      @(negedge clk);
      if (&(d_t[N] | d_f[N]) && !cons_ack) begin
        logic [W-1:0] e;
        e = sent.pop_front();
        checks++;
        if (d_t[N] !== e || d_f[N] !== ~e) begin failures++; $display("item %0d: got %h expected %h", n, d_t[N], e); end
        n++;
        repeat ($urandom_range(0, 3)) @(negedge clk);
        cons_ack = 1;
      end else if (!(|(d_t[N] | d_f[N])) && cons_ack) begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
        cons_ack = 0;
      end
    end
    checks++;
    if (adjacent_same == 0) begin failures++; $display("overlap of an item in two stages never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
