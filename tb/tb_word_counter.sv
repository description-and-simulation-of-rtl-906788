// tb_word_counter -- random enable/clear sequence against a reference count.
`timescale 1ns/1ps
module tb_word_counter;
  logic clk = 1'b0, rst_n, clr, en, last;
  logic [1:0] count;
  int unsigned checks = 0, failures = 0, model = 0, wraps = 0;
  always #5 clk = ~clk;

  word_counter #(.WIDTH(2)) dut (.*);

  initial begin
    rst_n = 1'b0; clr = 1'b0; en = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      checks++;
      if (count != 2'(model) || last != (model == 3)) begin
        failures++; $display("FAIL cycle %0d: count %0d expected %0d", i, count, model);
      end
      clr = ($urandom % 23) == 0;
      en  = ($urandom % 4) != 0;
      @(posedge clk);
      if (clr) model = 0;
      else if (en) begin
        if (model == 3) wraps++;
        model = (model + 1) % 4;
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL: counter never wrapped"); end
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
