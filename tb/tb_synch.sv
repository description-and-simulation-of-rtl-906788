// tb_synch -- checks the uplink counters against a reference count, that
// every subframe holds exactly 4*DL_SLOTS downlink strobes numbered 0..DL-1,
// no two strobes more than ceil(UL/DL)+1 clocks apart, and the frame length.
`timescale 1ns/1ps
module tb_synch;
  import isp_pkg::*;
  localparam int unsigned UL = 16, DL = 5;
  logic clk = 1'b0, rst_n;
  timing_t tim;
  int unsigned checks = 0, failures = 0;
  always #5 clk = ~clk;

  synch #(.UL_SLOTS(UL), .DL_SLOTS(DL)) dut (.*);

  initial begin
    int unsigned n, strobes, gap, frames;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    strobes = 0; gap = 0; frames = 0;
    for (n = 0; n < 3 * SUBFRAMES * UL * 4; n++) begin
      @(negedge clk);
      checks++;
      if (tim.ul_word != 2'(n % 4) || tim.ul_slot != 16'((n / 4) % UL) ||
          tim.subframe != 4'((n / (4 * UL)) % SUBFRAMES) || tim.frame != 4'(n / (4 * UL * SUBFRAMES)) ||
          tim.sf_start != (n % (4 * UL) == 0) || tim.frame_start != (n % (4 * UL * SUBFRAMES) == 0)) begin
        failures++; $display("FAIL clock %0d: uplink timing wrong", n);
      end
      if (tim.frame_start) frames++;
      if (tim.sf_start && n != 0) begin
        checks++;
        if (strobes != 4 * DL) begin failures++; $display("FAIL: %0d strobes in a subframe", strobes); end
        strobes = 0;
      end
      gap++;
      if (tim.dl_strobe) begin
        checks++;
        if (tim.dl_word != 2'(strobes % 4) || tim.dl_slot != 16'(strobes / 4) || gap > (UL + DL - 1) / DL + 1) begin
          failures++; $display("FAIL clock %0d: strobe %0d word %0d slot %0d gap %0d", n, strobes, tim.dl_word, tim.dl_slot, gap);
        end
        strobes++; gap = 0;
      end
    end
    checks++;
    if (frames != 3) begin failures++; $display("FAIL: %0d frame starts", frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (4 * SUBFRAMES * UL * 4) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
