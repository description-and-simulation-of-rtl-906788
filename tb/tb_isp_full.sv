// tb_isp_full -- the switch at its default sizes: 8192 uplink and 2500
// downlink subpacket slots per subframe, 10240-word Shared RAM per beam.
//
// Two full frames of random traffic (about 300 users, one in five multicast,
// random beam masks) with the default dwell times of 312 slots. isp_checker
// checks every downlink word of all eight beams against its prediction.
`timescale 1ns/1ps
module tb_isp_full;
  import isp_pkg::*;

  localparam int unsigned UL = 8192;
  localparam int unsigned DL = 2500;
  localparam int unsigned RAMW = 10240;
  localparam int unsigned FD = 2500;
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

  isp dut (.*);

  isp_checker #(.UL_SLOTS(UL), .DL_SLOTS(DL), .FIFO_DEPTH(FD), .RAM_SLOTS(RAMW / 4),
                .N_FRAMES(2), .PAPER_WORKLOAD(1'b0), .REQUIRE_ALL(1'b0)) chk (.*);

  initial begin
    repeat (2 * 16 * UL * 4 + 5000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk.checks, chk.failures + 1);
    $finish;
  end
endmodule
