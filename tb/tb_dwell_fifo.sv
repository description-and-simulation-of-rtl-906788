// tb_dwell_fifo -- ping-pong Dwell FIFO against two queue models: entries
// pushed in one subframe come out in order in the next; empty/full and
// almost-full flags; overrun when unread entries remain at a swap; a push in
// the swap clock itself.
`timescale 1ns/1ps
module tb_dwell_fifo;
  localparam int unsigned DEPTH = 6, DW = 8, AFM = 2;
  logic clk = 1'b0, rst_n, swap, wbank, push, pop, rempty, wfull, almost_full, overrun;
  logic [DW-1:0] wdata, rdata;
  int unsigned checks = 0, failures = 0, n_over = 0, n_full = 0, n_af = 0;
  int unsigned q [2][$];
  always #5 clk = ~clk;

  dwell_fifo #(.DEPTH(DEPTH), .DW(DW), .AF_MARGIN(AFM)) dut (.*);

  initial begin
    logic pend;
    int unsigned expd;
    logic exp_over;
    rst_n = 1'b0; swap = 1'b0; wbank = 1'b0; push = 1'b0; pop = 1'b0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    pend = 1'b0;
    for (int sf = 0; sf < 40; sf++) begin
      for (int c = 0; c < 12; c++) begin
        @(negedge clk);
        if (pend) begin
          checks++;
          if (rdata != DW'(expd)) begin failures++; $display("FAIL sf %0d: rdata %0d expected %0d", sf, rdata, expd); end
        end
        swap  = (c == 0);
        wbank = sf[0];
        exp_over = 1'b0;
        if (swap) begin exp_over = q[wbank].size() != 0; q[wbank].delete(); end
        #1;
        checks++;
        if (rempty != (q[~wbank].size() == 0) || wfull != (q[wbank].size() == DEPTH) ||
            almost_full != (q[wbank].size() >= DEPTH - AFM) || overrun != exp_over) begin
          failures++;
          $display("FAIL sf %0d c %0d: rempty %0d wfull %0d af %0d overrun %0d", sf, c, rempty, wfull, almost_full, overrun);
        end
        if (overrun) n_over++;
        if (wfull) n_full++;
        if (almost_full) n_af++;
        push  = !wfull && ($urandom % 2);
        wdata = DW'($urandom);
        pop   = !rempty && ($urandom % 4 != 0) && !(sf % 5 == 3);
        pend  = pop;
        if (pop) expd = q[~wbank].pop_front();
        if (push) q[wbank].push_back(wdata);
      end
    end
    checks++;
    if (n_over == 0 || n_full == 0 || n_af == 0) begin failures++; $display("FAIL: overrun/full/almost-full never seen"); end
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
