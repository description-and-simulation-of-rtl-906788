// processor -- control of one beam's shared-memory switch.
//
// Uplink (write) side, at the first word of every data subpacket that the
// dwell header decoder marks for this beam: if the address pool has a free
// address, the write bank of the ACM has room and every Dwell FIFO to be
// written has room, the subpacket is accepted. The free address is popped
// from the APF and used for the four Shared RAM word writes (low bits from
// the write counter); it is written with the multicast flag into the next
// ACM entry, and that ACM entry number is pushed into the destination Dwell
// FIFO, or into all eight for multicast. Otherwise the subpacket is dropped
// and ev_drop pulses (the congestion signal for the network controller).
//
// Downlink (read) side: each downlink subframe is divided into dwells. Dwell
// d owns dwell_len[d] consecutive downlink subpacket slots, in order 0..7,
// the lengths being reloaded from dwell_len_i at every frame start (dwell
// times are programmable frame by frame). At the first word strobe of a slot
// the current dwell's FIFO (read bank) is popped if not empty; otherwise the
// slot goes out idle. The popped ACM entry number reads the ACM (read bank),
// which returns the Shared RAM subpacket address, and the four words are read
// with the read counter. After the fourth word, the address goes back to the
// APF at once for a single-destination subpacket; for a multicast subpacket,
// only when the last dwell (dwell 7) has sent it, so no dwell is left
// pointing at a reused location.
//
// Ping-pong: ACM and Dwell FIFO write bank = subframe parity, read bank = the
// other; both swap at each subframe start.
//
// Timing: a downlink word appears on dl_* three clocks after its strobe in
// tim (FIFO read, ACM read, RAM read, each one registered clock). Uplink
// words are written in the clock they are presented. All signals are in the
// (already registered) timing domain delivered by the TDM bus.
module processor
  import isp_pkg::*;
#(
  parameter int unsigned DL_SLOTS  = 2500,
  parameter int unsigned ACM_DEPTH = 2560,
  parameter int unsigned RAM_SLOTS = 2560,
  localparam int unsigned SA_W  = $clog2(RAM_SLOTS),
  localparam int unsigned ACM_W = $clog2(ACM_DEPTH),
  localparam int unsigned LEN_W = $clog2(DL_SLOTS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  timing_t          tim,
  input  dest_t            dest,
  input  logic             beam_hit,
  input  dwell_mask_t      dwell_req,
  input  logic [LEN_W-1:0] dwell_len_i [NUM_DWELLS],
  // address pool
  output logic             apf_pop,
  input  logic [SA_W-1:0]  apf_head,
  input  logic             apf_empty,
  output logic             apf_push,
  output logic [SA_W-1:0]  apf_push_addr,
  // address control memory
  output logic             bank_swap,
  output logic             wbank,
  output logic             acm_we,
  output logic [SA_W-1:0]  acm_wslot,
  output logic             acm_wmc,
  input  logic             acm_full,
  output logic             acm_re,
  output logic [ACM_W-1:0] acm_raddr,
  input  logic [SA_W-1:0]  acm_rslot,
  input  logic             acm_rmc,
  // dwell FIFOs
  output dwell_mask_t      fifo_push,
  input  dwell_mask_t      fifo_wfull,
  output dwell_mask_t      fifo_pop,
  input  dwell_mask_t      fifo_rempty,
  input  logic [ACM_W-1:0] fifo_rdata [NUM_DWELLS],
  // shared RAM and word counters
  output logic             ram_we,
  output logic [SA_W-1:0]  ram_wslot,
  output logic             ram_re,
  output logic [SA_W-1:0]  ram_rslot,
  output logic             wcnt_en,
  output logic             rcnt_en,
  // downlink framing (aligned with the RAM read data)
  output logic             dl_strobe,
  output logic [1:0]       dl_word,
  output logic [15:0]      dl_slot,
  output logic             dl_valid,
  output dwell_t           dl_dwell,
  // events
  output logic             ev_accept,
  output logic             ev_drop,
  output logic             ev_mc_hold
);

  // ---------------- uplink ----------------
  logic            accept;
  logic            wr_act_q;
  logic [SA_W-1:0] wslot_q;

  assign bank_swap = tim.sf_start;
  assign wbank     = tim.subframe[0];

  assign accept    = beam_hit && !apf_empty && !acm_full && ((dwell_req & fifo_wfull) == '0);
  assign apf_pop   = accept;
  assign acm_we    = accept;
  assign acm_wslot = apf_head;
  assign acm_wmc   = dest.multicast;
  assign fifo_push = accept ? dwell_req : '0;
  assign ram_we    = (tim.ul_word == 2'd0) ? accept : wr_act_q;
  assign ram_wslot = (tim.ul_word == 2'd0) ? apf_head : wslot_q;
  assign wcnt_en   = ram_we;
  assign ev_accept = accept;
  assign ev_drop   = beam_hit && !accept;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_act_q <= 1'b0;
      wslot_q  <= '0;
    end else if (tim.ul_word == 2'd0) begin
      wr_act_q <= accept;
      wslot_q  <= apf_head;
    end else if (tim.ul_word == 2'd3) begin
      wr_act_q <= 1'b0;
    end
  end

  // ---------------- dwell schedule ----------------
  logic [LEN_W-1:0] len_q   [NUM_DWELLS];
  logic [LEN_W-1:0] len_cur [NUM_DWELLS];
  logic [16:0]      dw_end  [NUM_DWELLS];   // exclusive end slot of each dwell
  logic [16:0]      run;
  logic             d0_valid;
  dwell_t           d0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               len_q <= '{default: LEN_W'(DL_SLOTS / NUM_DWELLS)};
    else if (tim.frame_start) len_q <= dwell_len_i;
  end

  always_comb begin
    len_cur = tim.frame_start ? dwell_len_i : len_q;
    run = '0;
    for (int i = 0; i < NUM_DWELLS; i++) begin
      run       = run + 17'(len_cur[i]);
      dw_end[i] = run;
    end
    d0_valid = 1'b0;
    d0       = '0;
    for (int i = NUM_DWELLS - 1; i >= 0; i--)
      if (17'(tim.dl_slot) < dw_end[i]) begin
        d0_valid = 1'b1;
        d0       = dwell_t'(i);
      end
  end

  // ---------------- downlink ----------------
  // stage 0: FIFO pop; stage 1: ACM read; stage 2: RAM read; stage 3: output
  logic        slot_first;
  logic        v1_q, v2_q;
  dwell_t      d1_q, d2_q;
  logic [2:1]  str_q;
  logic [1:0]  w1_q, w2_q;
  logic [15:0] s1_q, s2_q;
  logic        sv_q, smc_q;
  dwell_t      sd_q;
  logic [SA_W-1:0] sslot_q;
  logic        rd_v, rd_mc;
  dwell_t      rd_d;

  assign slot_first = tim.dl_strobe && (tim.dl_word == 2'd0);

  always_comb begin
    fifo_pop = '0;
    if (slot_first && d0_valid && !fifo_rempty[d0]) fifo_pop[d0] = 1'b1;
  end

  assign acm_re    = v1_q;
  assign acm_raddr = fifo_rdata[d1_q];

  // stage 2 selects the freshly read ACM entry on word 0, the held one after
  always_comb begin
    if (w2_q == 2'd0) begin
      rd_v      = v2_q;
      rd_mc     = acm_rmc;
      rd_d      = d2_q;
      ram_rslot = acm_rslot;
    end else begin
      rd_v      = sv_q;
      rd_mc     = smc_q;
      rd_d      = sd_q;
      ram_rslot = sslot_q;
    end
  end

  assign ram_re        = str_q[2] && rd_v;
  assign rcnt_en       = ram_re;
  assign apf_push      = ram_re && (w2_q == 2'd3) && (!rd_mc || rd_d == dwell_t'(NUM_DWELLS - 1));
  assign apf_push_addr = ram_rslot;
  assign ev_mc_hold    = ram_re && (w2_q == 2'd3) && rd_mc && (rd_d != dwell_t'(NUM_DWELLS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q <= 1'b0; v2_q <= 1'b0;
      d1_q <= '0;   d2_q <= '0;
      str_q <= '0;
      w1_q <= '0;   w2_q <= '0;
      s1_q <= '0;   s2_q <= '0;
      sv_q <= 1'b0; smc_q <= 1'b0; sd_q <= '0; sslot_q <= '0;
      dl_strobe <= 1'b0; dl_word <= '0; dl_slot <= '0; dl_valid <= 1'b0; dl_dwell <= '0;
    end else begin
      v1_q     <= |fifo_pop;
      d1_q     <= d0;
      v2_q     <= v1_q;
      d2_q     <= d1_q;
      str_q    <= {str_q[1], tim.dl_strobe};
      w1_q     <= tim.dl_word;
      w2_q     <= w1_q;
      s1_q     <= tim.dl_slot;
      s2_q     <= s1_q;
      if (str_q[2] && w2_q == 2'd0) begin
        sv_q    <= v2_q;
        smc_q   <= acm_rmc;
        sd_q    <= d2_q;
        sslot_q <= acm_rslot;
      end
      dl_strobe <= str_q[2];
      dl_word   <= w2_q;
      dl_slot   <= s2_q;
      dl_valid  <= ram_re;
      dl_dwell  <= rd_d;
    end
  end

  a_apf_no_drop_mc: assert property (@(posedge clk) disable iff (!rst_n)
      ev_drop |-> !apf_pop)
    else $error("processor: pool popped for a dropped subpacket");

endmodule
