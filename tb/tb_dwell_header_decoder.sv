// tb_dwell_header_decoder -- exhaustive check of the Dwell FIFO write enables
// over busy, all beam masks, dwell, multicast and the first-word strobe.
`timescale 1ns/1ps
module tb_dwell_header_decoder;
  import isp_pkg::*;
  localparam int unsigned BEAM = 5;
  dest_t       dest;
  logic        sp_first, beam_hit;
  dwell_mask_t dwell_we;
  int unsigned checks = 0, failures = 0;

  dwell_header_decoder #(.BEAM_ID(BEAM)) dut (.*);

  initial begin
    logic        hit;
    dwell_mask_t exp;
    for (int i = 0; i < (1 << 14); i++) begin
      {sp_first, dest} = 14'(i);
      #1;
      hit = sp_first && dest.busy && dest.beam_en[BEAM];
      exp = !hit ? 8'h00 : dest.multicast ? 8'hFF : 8'(1) << dest.dwell;
      checks++;
      if (beam_hit != hit || dwell_we != exp) begin
        failures++;
        $display("FAIL in=%h: hit %0d we %b, expected %0d %b", i, beam_hit, dwell_we, hit, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
