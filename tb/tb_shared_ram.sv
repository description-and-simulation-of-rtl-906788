// tb_shared_ram -- random simultaneous writes and reads against an array model;
// checks the one-clock read latency and old-data-on-collision behaviour.
`timescale 1ns/1ps
module tb_shared_ram;
  localparam int unsigned WORDS = 64;
  logic clk = 1'b0, we, re;
  logic [5:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [31:0] model [WORDS];
  int unsigned checks = 0, failures = 0;
  always #5 clk = ~clk;

  shared_ram #(.WORDS(WORDS), .W(32)) dut (.*);

  initial begin
    logic [31:0] expd;
    logic        pend;
    we = 1'b1; re = 1'b0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); waddr = 6'(i); wdata = $urandom; model[i] = wdata;
    end
    pend = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rdata != expd) begin failures++; $display("FAIL read %0d: %h expected %h", i, rdata, expd); end
      end
      we = $urandom % 2; re = $urandom % 2;
      waddr = 6'($urandom); raddr = ($urandom % 8 == 0) ? waddr : 6'($urandom);
      wdata = $urandom;
      pend = re;
      expd = model[raddr];
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
