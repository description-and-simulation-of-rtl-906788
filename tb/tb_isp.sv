// tb_isp -- end-to-end test of the switch at the reduced reference sizes.
//
// 256 uplink subpacket slots and 80 downlink slots per subframe, three frames,
// all eight beams. isp_checker drives the reference workload (27 uplink
// subpackets per subframe, 69 downlink subpackets on beam 0) plus dwell time
// re-programming and a one-dwell overload, and checks every downlink word of
// every beam against its prediction.
`timescale 1ns/1ps
module tb_isp;
  import isp_pkg::*;

  localparam int unsigned UL = 256;
  localparam int unsigned DL = 80;
  localparam int unsigned RAMW = 4096;
  localparam int unsigned FD = 16;
  localparam int unsigned LEN_W = $clog2(DL + 1);
  localparam int unsigned FREE_W = $clog2(RAMW / 4 + 1);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             rst_n;
  word_t            ul_data;
  timing_t          timing;
  logic [LEN_W-1:0] dwell_len [NUM_BEAMS][NUM_DWELLS];
  logic             dl_strobe [NUM_BEAMS], dl_valid [NUM_BEAMS];
  word_t            dl_data   [NUM_BEAMS];
  dwell_t           dl_dwell  [NUM_BEAMS];
  logic [1:0]       dl_word   [NUM_BEAMS];
  logic [15:0]      dl_slot   [NUM_BEAMS];
  dwell_mask_t      almost_full [NUM_BEAMS], overrun [NUM_BEAMS];
  logic             ev_accept [NUM_BEAMS], ev_drop [NUM_BEAMS], ev_mc_hold [NUM_BEAMS], ev_return [NUM_BEAMS];
  logic [FREE_W-1:0] free_slots [NUM_BEAMS];

  isp #(.UL_SLOTS(UL), .DL_SLOTS(DL), .RAM_WORDS(RAMW), .FIFO_DEPTH(FD), .AF_MARGIN(2)) dut (.*);

  isp_checker #(.UL_SLOTS(UL), .DL_SLOTS(DL), .FIFO_DEPTH(FD), .RAM_SLOTS(RAMW / 4),
                .N_FRAMES(3), .PAPER_WORKLOAD(1'b1), .REQUIRE_ALL(1'b1)) chk (.*);

  initial begin
    repeat (3 * 16 * UL * 4 + 5000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk.checks, chk.failures + 1);
    $finish;
  end
endmodule
