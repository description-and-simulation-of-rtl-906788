// isp -- information-switching processor: top level.
//
// One uplink TDM bus carries the subpackets of all uplink beams, one 32-bit
// word per clock. The synch block times frames, subframes, subpacket slots
// and the downlink word strobe; the TDM bus decodes header subpackets and
// attaches each data word's destination; then each of the eight downlink
// beams has its own shared-memory switch (beam_switch), which takes the
// subpackets enabled for it (spatial switching) and re-orders them into its
// eight dwells (temporal switching). The downlink lags the uplink by one
// subframe: what is stored in subframe s is sent in subframe s+1.
//
// Ports: ul_data is the bus word for the slot/word given by the timing
// outputs (ul_* and subframe/frame, combinational from the synch counters).
// Per beam: dwell lengths (downlink slots per dwell, reloaded at each frame
// start), the downlink word stream, congestion flags and event pulses.
// Downlink words appear four clocks after their strobe in the synch timing.
module isp
  import isp_pkg::*;
#(
  parameter int unsigned UL_SLOTS   = 8192,
  parameter int unsigned DL_SLOTS   = 2500,
  parameter int unsigned RAM_WORDS  = 10240,
  parameter int unsigned ACM_DEPTH  = RAM_WORDS / WORDS_PER_SUBPKT,
  parameter int unsigned FIFO_DEPTH = DL_SLOTS,
  parameter int unsigned AF_MARGIN  = 8,
  localparam int unsigned LEN_W     = $clog2(DL_SLOTS + 1),
  localparam int unsigned FREE_W    = $clog2(RAM_WORDS / WORDS_PER_SUBPKT + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // uplink TDM bus
  input  word_t            ul_data,
  output timing_t          timing,
  // dwell times, per beam and dwell, in downlink subpacket slots
  input  logic [LEN_W-1:0] dwell_len   [NUM_BEAMS][NUM_DWELLS],
  // downlink, per beam
  output logic             dl_strobe   [NUM_BEAMS],
  output logic             dl_valid    [NUM_BEAMS],
  output word_t            dl_data     [NUM_BEAMS],
  output dwell_t           dl_dwell    [NUM_BEAMS],
  output logic [1:0]       dl_word     [NUM_BEAMS],
  output logic [15:0]      dl_slot     [NUM_BEAMS],
  // congestion monitoring and events, per beam
  output dwell_mask_t      almost_full [NUM_BEAMS],
  output dwell_mask_t      overrun     [NUM_BEAMS],
  output logic             ev_accept   [NUM_BEAMS],
  output logic             ev_drop     [NUM_BEAMS],
  output logic             ev_mc_hold  [NUM_BEAMS],
  output logic             ev_return   [NUM_BEAMS],
  output logic [FREE_W-1:0] free_slots [NUM_BEAMS]
);

  timing_t tim_q;
  word_t   data_q;
  dest_t   dest_q;

  synch #(.UL_SLOTS(UL_SLOTS), .DL_SLOTS(DL_SLOTS)) u_synch (
    .clk, .rst_n, .tim(timing)
  );

  tdm_bus #(.UL_SLOTS(UL_SLOTS)) u_bus (
    .clk, .rst_n, .tim(timing), .ul_data,
    .tim_q, .data_q, .dest_q, .hdr_we()
  );

  for (genvar b = 0; b < NUM_BEAMS; b++) begin : g_beam
    beam_switch #(
      .BEAM_ID(b), .DL_SLOTS(DL_SLOTS), .RAM_WORDS(RAM_WORDS),
      .ACM_DEPTH(ACM_DEPTH), .FIFO_DEPTH(FIFO_DEPTH), .AF_MARGIN(AF_MARGIN)
    ) u_beam (
      .clk, .rst_n, .tim(tim_q), .data(data_q), .dest(dest_q),
      .dwell_len(dwell_len[b]),
      .dl_strobe(dl_strobe[b]), .dl_valid(dl_valid[b]), .dl_data(dl_data[b]),
      .dl_dwell(dl_dwell[b]), .dl_word(dl_word[b]), .dl_slot(dl_slot[b]),
      .almost_full(almost_full[b]), .overrun(overrun[b]),
      .ev_accept(ev_accept[b]), .ev_drop(ev_drop[b]), .ev_mc_hold(ev_mc_hold[b]),
      .ev_return(ev_return[b]), .free_slots(free_slots[b])
    );
  end

endmodule
