// tdm_bus -- uplink TDM bus front end: header decoding and destination store.
//
// Each uplink slot of a frame belongs to one user. In the header subframe
// (subframe 0) the slot carries that user's header subpacket; this block
// decodes words 0 and 1 of it and stores the slot's destination (busy flag,
// beam-enable mask, destination dwell, multicast bit) in a table of UL_SLOTS
// entries. In the 15 data subframes that follow, the table entry of the
// current slot is read out alongside the data words, so the destination
// decoded once per frame routes all 15 data subpackets of the packet.
//
// Timing: everything is registered once. data_q, dest_q and tim_q appear one
// clock after the bus word and the synch timing that came with it, so the
// whole switch downstream runs on tim_q and stays aligned with the data.
// dest_q is all-zero (not busy) during the header subframe. Only the low three
// bits of the 4-bit dwell field are used.
module tdm_bus
  import isp_pkg::*;
#(
  parameter int unsigned UL_SLOTS = 8192
) (
  input  logic    clk,
  input  logic    rst_n,
  input  timing_t tim,       // from synch
  input  word_t   ul_data,   // uplink TDM bus word
  output timing_t tim_q,
  output word_t   data_q,
  output dest_t   dest_q,
  output logic    hdr_we     // a header was stored this clock (for monitoring)
);

  localparam int unsigned SLOT_W = $clog2(UL_SLOTS);

  dest_t   table_mem [UL_SLOTS];
  hdr_w0_t w0_q;
  hdr_w0_t w0;
  hdr_w1_t w1;
  logic    hdr_sf;

  assign w0     = hdr_w0_t'(ul_data);
  assign w1     = hdr_w1_t'(ul_data);
  assign hdr_sf = (tim.subframe == '0);
  assign hdr_we = hdr_sf && (tim.ul_word == 2'd1);

  // Destination table: written in the header subframe, read in data subframes.
  always_ff @(posedge clk) begin
    if (hdr_we)
      table_mem[tim.ul_slot[SLOT_W-1:0]] <= '{busy:      (w0_q.busy != '0),
                                             beam_en:   w0_q.beam_en,
                                             dwell:     dwell_t'(w1.dwell),
                                             multicast: w1.multicast};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w0_q   <= '0;
      tim_q  <= '0;
      data_q <= '0;
      dest_q <= '0;
    end else begin
      if (hdr_sf && tim.ul_word == 2'd0) w0_q <= w0;
      tim_q  <= tim;
      data_q <= ul_data;
      dest_q <= hdr_sf ? '0 : table_mem[tim.ul_slot[SLOT_W-1:0]];
    end
  end

endmodule
