// tb_apf -- the pool starts full with addresses 0..N-1 in order, empties,
// then returns addresses in FIFO order, with random push/pop traffic checked
// against a queue model (including simultaneous push and pop).
`timescale 1ns/1ps
module tb_apf;
  localparam int unsigned N = 8;
  logic clk = 1'b0, rst_n, pop, empty, push;
  logic [2:0] head, push_addr;
  logic [3:0] count;
  int unsigned checks = 0, failures = 0;
  int unsigned q [$];
  int unsigned outside [$];
  always #5 clk = ~clk;

  apf #(.N(N)) dut (.*);

  task automatic check_state(string where);
    checks++;
    if (empty != (q.size() == 0) || count != 4'(q.size()) || (q.size() != 0 && head != 3'(q[0]))) begin
      failures++;
      $display("FAIL %s: empty %0d count %0d head %0d, expected %0d %0d %0d", where, empty, count, head,
               q.size() == 0, q.size(), q.size() ? q[0] : 0);
    end
  endtask

  initial begin
    rst_n = 1'b0; pop = 1'b0; push = 1'b0; push_addr = '0;
    for (int i = 0; i < N; i++) q.push_back(i);
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      check_state($sformatf("cycle %0d", i));
      pop  = (q.size() != 0) && ($urandom % 2 || i < N);
      push = (outside.size() != 0) && ($urandom % 3 == 0) && i > N;
      push_addr = push ? 3'(outside[0]) : '0;
      @(posedge clk);
      if (pop) outside.push_back(q.pop_front());
      if (push) q.push_back(outside.pop_front());
      if (i == N - 1) begin
        #1; checks++;
        if (!empty) begin failures++; $display("FAIL: pool not empty after N pops"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
