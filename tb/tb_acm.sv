// tb_acm -- ping-pong behaviour of the address control memory: entries are
// written sequentially into the write bank (waddr counts 0,1,2.. from each
// swap), the full flag at DEPTH, and random reads of the other bank return
// what was written there in the previous subframe, one clock after re.
`timescale 1ns/1ps
module tb_acm;
  localparam int unsigned DEPTH = 8, SA_W = 5;
  logic clk = 1'b0, rst_n, swap, wbank, we, wmc, full, re, rmc;
  logic [SA_W-1:0] wslot, rslot;
  logic [2:0] waddr, raddr;
  int unsigned checks = 0, failures = 0;
  logic [SA_W:0] model [2][DEPTH];
  int unsigned nwr [2];
  always #5 clk = ~clk;

  acm #(.DEPTH(DEPTH), .SA_W(SA_W)) dut (.*);

  initial begin
    int unsigned wcount;
    logic        pend;
    logic [SA_W:0] expd;
    rst_n = 1'b0; swap = 1'b0; wbank = 1'b0; we = 1'b0; re = 1'b0; wslot = '0; wmc = 1'b0; raddr = '0;
    nwr[0] = 0; nwr[1] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    pend = 1'b0;
    for (int sf = 0; sf < 12; sf++) begin
      wcount = 0;
      for (int c = 0; c < 24; c++) begin
        @(negedge clk);
        if (pend) begin
          checks++;
          if ({rmc, rslot} != expd) begin failures++; $display("FAIL sf %0d: read %h expected %h", sf, {rmc, rslot}, expd); end
        end
        swap  = (c == 0);
        wbank = sf[0];
        if (c == 0) nwr[wbank] = 0;
        #1;
        checks++;
        if (waddr != 3'(wcount) && !full || full != (wcount == DEPTH)) begin
          failures++; $display("FAIL sf %0d: waddr %0d full %0d after %0d writes", sf, waddr, full, wcount);
        end
        we    = (wcount < DEPTH) && ($urandom % 3 != 0) && !(sf == 5);
        if (sf == 7) we = (wcount < DEPTH);
        wslot = SA_W'($urandom); wmc = $urandom % 2;
        re    = (nwr[~wbank] != 0) && ($urandom % 2);
        raddr = re ? 3'($urandom % nwr[~wbank]) : '0;
        pend  = re;
        expd  = model[~wbank][raddr];
        if (we) begin model[wbank][wcount] = {wmc, wslot}; wcount++; nwr[wbank] = wcount; end
      end
      if (sf == 7) begin
        checks++;
        if (wcount != DEPTH) begin failures++; $display("FAIL: bank never filled"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
