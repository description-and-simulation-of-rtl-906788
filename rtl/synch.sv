// synch -- system timing generator of the switch.
//
// One clock is one uplink TDM-bus word time. The generator counts words (4 per
// subpacket), uplink subpacket slots (UL_SLOTS per subframe), subframes (16 per
// frame, subframe 0 being the header subframe) and frames (4-bit count, as in
// the header format). All blocks take their timing from this one source, so
// the switch is fully synchronous.
//
// The downlink runs slower than the uplink bus. A fractional accumulator adds
// DL_SLOTS every clock and raises dl_strobe whenever the sum reaches UL_SLOTS,
// which gives exactly 4*DL_SLOTS downlink word strobes per subframe of
// 4*UL_SLOTS clocks, evenly spread. dl_word/dl_slot number the strobes within
// the subframe and wrap back to zero exactly at the subframe boundary.
//
// Defaults: 8192 uplink subpackets per 2 ms subframe (the 524 Mb/s TDM bus) and
// 2500 downlink subpackets per subframe (160 Mb/s for 2 ms in 128-bit
// subpackets). The fractional strobe is this design's own choice; the
// reference simulation used fixed 60 ns / 192 ns word times instead.
module synch
  import isp_pkg::*;
#(
  parameter int unsigned UL_SLOTS = 8192,
  parameter int unsigned DL_SLOTS = 2500
) (
  input  logic    clk,
  input  logic    rst_n,
  output timing_t tim
);

  localparam int unsigned ACC_W = $clog2(UL_SLOTS + DL_SLOTS + 1);

  logic [1:0]       ul_word_q;
  logic [15:0]      ul_slot_q;
  logic [3:0]       subframe_q, frame_q;
  logic [1:0]       dl_word_q;
  logic [15:0]      dl_slot_q;
  logic [ACC_W-1:0] acc_q, acc_sum;
  logic             strobe;

  assign acc_sum = acc_q + ACC_W'(DL_SLOTS);
  assign strobe  = acc_sum >= ACC_W'(UL_SLOTS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ul_word_q  <= '0;
      ul_slot_q  <= '0;
      subframe_q <= '0;
      frame_q    <= '0;
      acc_q      <= '0;
      dl_word_q  <= '0;
      dl_slot_q  <= '0;
    end else begin
      ul_word_q <= ul_word_q + 2'd1;
      if (ul_word_q == 2'd3) begin
        if (ul_slot_q == 16'(UL_SLOTS - 1)) begin
          ul_slot_q  <= '0;
          subframe_q <= subframe_q + 4'd1;
          if (subframe_q == 4'(SUBFRAMES - 1)) frame_q <= frame_q + 4'd1;
        end else begin
          ul_slot_q <= ul_slot_q + 16'd1;
        end
      end
      acc_q <= strobe ? acc_sum - ACC_W'(UL_SLOTS) : acc_sum;
      if (strobe) begin
        dl_word_q <= dl_word_q + 2'd1;
        if (dl_word_q == 2'd3)
          dl_slot_q <= (dl_slot_q == 16'(DL_SLOTS - 1)) ? '0 : dl_slot_q + 16'd1;
      end
    end
  end

  always_comb begin
    tim.ul_word     = ul_word_q;
    tim.ul_slot     = ul_slot_q;
    tim.subframe    = subframe_q;
    tim.frame       = frame_q;
    tim.sf_start    = (ul_word_q == 2'd0) && (ul_slot_q == '0);
    tim.frame_start = tim.sf_start && (subframe_q == '0);
    tim.dl_strobe   = strobe;
    tim.dl_word     = dl_word_q;
    tim.dl_slot     = dl_slot_q;
  end

  initial begin
    assert (DL_SLOTS <= UL_SLOTS) else $error("synch: DL_SLOTS must not exceed UL_SLOTS");
    assert (UL_SLOTS <= 65536) else $error("synch: UL_SLOTS exceeds the 16-bit slot count");
  end

endmodule
