// isp_pkg -- shared types and constants of the information-switching processor.
//
// The switch carries 128-bit subpackets as four 32-bit words. A frame has 16
// subframes; subframe 0 carries only header subpackets, subframes 1..15 carry
// data. There are eight downlink beams with eight dwells each.
//
// Header subpacket layout (MSB first), per the packet format of the design:
//   word 0: busy/idle(4) frame(4) subframe(4) user(8) word(4) beam_enable(8)
//   word 1: dwell(4) frame(4) subframe(4) zero(7) multicast(1) word(4) beam_enable(8)
// Word 1's seven zero bits and the placement of the multicast bit just above
// the word field are this design's reading of the format. A header is "busy"
// when its busy/idle field is non-zero (own choice).
package isp_pkg;

  localparam int unsigned NUM_BEAMS        = 8;   // downlink TDM beams
  localparam int unsigned NUM_DWELLS       = 8;   // dwells per downlink beam
  localparam int unsigned SUBFRAMES        = 16;  // subframes per frame
  localparam int unsigned WORDS_PER_SUBPKT = 4;   // 128-bit subpacket / 32-bit word
  localparam int unsigned WORD_W           = 32;

  typedef logic [WORD_W-1:0]       word_t;
  typedef logic [NUM_BEAMS-1:0]    beam_mask_t;
  typedef logic [NUM_DWELLS-1:0]   dwell_mask_t;
  typedef logic [$clog2(NUM_DWELLS)-1:0] dwell_t;

  typedef struct packed {
    logic [3:0] busy;
    logic [3:0] frame;
    logic [3:0] subframe;
    logic [7:0] user;
    logic [3:0] word;
    beam_mask_t beam_en;
  } hdr_w0_t;

  typedef struct packed {
    logic [3:0] dwell;
    logic [3:0] frame;
    logic [3:0] subframe;
    logic [6:0] zero;
    logic       multicast;
    logic [3:0] word;
    beam_mask_t beam_en;
  } hdr_w1_t;

  // Destination of one uplink slot, decoded from its header subpacket.
  typedef struct packed {
    logic       busy;
    beam_mask_t beam_en;
    dwell_t     dwell;
    logic       multicast;
  } dest_t;

  // System timing for one clock (one uplink word time). Slot and downlink
  // slot indices are carried at 16 bits, enough for 65536 slots per subframe.
  typedef struct packed {
    logic [1:0]  ul_word;      // word of the current uplink subpacket
    logic [15:0] ul_slot;      // uplink subpacket slot within the subframe
    logic [3:0]  subframe;     // 0 = header subframe
    logic [3:0]  frame;
    logic        sf_start;     // first clock of a subframe
    logic        frame_start;  // first clock of a frame
    logic        dl_strobe;    // a downlink word is sent this clock
    logic [1:0]  dl_word;      // word of the current downlink subpacket
    logic [15:0] dl_slot;      // downlink subpacket slot within the subframe
  } timing_t;

endpackage
