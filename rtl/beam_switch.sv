// beam_switch -- shared-memory switch of one downlink beam.
//
// Every downlink beam has its own Shared RAM, shared by its eight dwells.
// This module wires one beam's parts together:
//   dwell_header_decoder - which Dwell FIFOs a subpacket on the bus goes to
//   processor            - accept/drop, ping-pong control, dwell schedule
//   apf                  - free Shared RAM subpacket addresses
//   acm                  - ping-pong table: ACM entry -> Shared RAM address
//   dwell_fifo x 8       - ping-pong queues of ACM entry numbers per dwell
//   word_counter x 2     - word address bits for the RAM write and read ports
//   shared_ram           - the subpacket words
// A stored subpacket is reached through a double pointer: Dwell FIFO entry ->
// ACM entry -> Shared RAM subpacket address.
//
// Input timing comes from tdm_bus (tim, data, dest, all one clock after the
// bus). Output: dl_data with dl_valid/dl_dwell/dl_word/dl_slot, one word per
// dl_strobe, three clocks after the strobe in tim. dl_valid low on a strobe
// means an idle downlink slot. Defaults: 10240-word RAM (2560 subpackets),
// 2500 downlink slots per subframe.
module beam_switch
  import isp_pkg::*;
#(
  parameter int unsigned BEAM_ID     = 0,
  parameter int unsigned DL_SLOTS    = 2500,
  parameter int unsigned RAM_WORDS   = 10240,
  parameter int unsigned ACM_DEPTH   = RAM_WORDS / WORDS_PER_SUBPKT,
  parameter int unsigned FIFO_DEPTH  = DL_SLOTS,
  parameter int unsigned AF_MARGIN   = 8,
  localparam int unsigned RAM_SLOTS  = RAM_WORDS / WORDS_PER_SUBPKT,
  localparam int unsigned SA_W       = $clog2(RAM_SLOTS),
  localparam int unsigned ACM_W      = $clog2(ACM_DEPTH),
  localparam int unsigned LEN_W      = $clog2(DL_SLOTS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  timing_t          tim,
  input  word_t            data,
  input  dest_t            dest,
  input  logic [LEN_W-1:0] dwell_len [NUM_DWELLS],
  output logic             dl_strobe,
  output logic             dl_valid,
  output word_t            dl_data,
  output dwell_t           dl_dwell,
  output logic [1:0]       dl_word,
  output logic [15:0]      dl_slot,
  output dwell_mask_t      almost_full,
  output dwell_mask_t      overrun,
  output logic             ev_accept,
  output logic             ev_drop,
  output logic             ev_mc_hold,
  output logic             ev_return,
  output logic [$clog2(RAM_SLOTS+1)-1:0] free_slots
);

  logic             beam_hit;
  dwell_mask_t      dwell_req;
  logic             apf_pop, apf_empty, apf_push;
  logic [SA_W-1:0]  apf_head, apf_push_addr;
  logic             bank_swap, wbank;
  logic             acm_we, acm_wmc, acm_full, acm_re, acm_rmc;
  logic [SA_W-1:0]  acm_wslot, acm_rslot;
  logic [ACM_W-1:0] acm_waddr, acm_raddr;
  dwell_mask_t      fifo_push, fifo_wfull, fifo_pop, fifo_rempty;
  logic [ACM_W-1:0] fifo_rdata [NUM_DWELLS];
  logic             ram_we, ram_re, wcnt_en, rcnt_en;
  logic [SA_W-1:0]  ram_wslot, ram_rslot;
  logic [1:0]       wcnt, rcnt;

  dwell_header_decoder #(.BEAM_ID(BEAM_ID)) u_dec (
    .dest, .sp_first(tim.ul_word == 2'd0 && tim.subframe != '0),
    .beam_hit, .dwell_we(dwell_req)
  );

  processor #(.DL_SLOTS(DL_SLOTS), .ACM_DEPTH(ACM_DEPTH), .RAM_SLOTS(RAM_SLOTS)) u_proc (
    .clk, .rst_n, .tim, .dest, .beam_hit, .dwell_req, .dwell_len_i(dwell_len),
    .apf_pop, .apf_head, .apf_empty, .apf_push, .apf_push_addr,
    .bank_swap, .wbank, .acm_we, .acm_wslot, .acm_wmc, .acm_full,
    .acm_re, .acm_raddr, .acm_rslot, .acm_rmc,
    .fifo_push, .fifo_wfull, .fifo_pop, .fifo_rempty, .fifo_rdata,
    .ram_we, .ram_wslot, .ram_re, .ram_rslot, .wcnt_en, .rcnt_en,
    .dl_strobe, .dl_word, .dl_slot, .dl_valid, .dl_dwell,
    .ev_accept, .ev_drop, .ev_mc_hold
  );

  apf #(.N(RAM_SLOTS)) u_apf (
    .clk, .rst_n, .pop(apf_pop), .head(apf_head), .empty(apf_empty),
    .push(apf_push), .push_addr(apf_push_addr), .count(free_slots)
  );

  acm #(.DEPTH(ACM_DEPTH), .SA_W(SA_W)) u_acm (
    .clk, .rst_n, .swap(bank_swap), .wbank, .we(acm_we), .wslot(acm_wslot),
    .wmc(acm_wmc), .waddr(acm_waddr), .full(acm_full),
    .re(acm_re), .raddr(acm_raddr), .rslot(acm_rslot), .rmc(acm_rmc)
  );

  for (genvar d = 0; d < NUM_DWELLS; d++) begin : g_dwell
    dwell_fifo #(.DEPTH(FIFO_DEPTH), .DW(ACM_W), .AF_MARGIN(AF_MARGIN)) u_fifo (
      .clk, .rst_n, .swap(bank_swap), .wbank,
      .push(fifo_push[d]), .wdata(acm_waddr),
      .pop(fifo_pop[d]), .rdata(fifo_rdata[d]), .rempty(fifo_rempty[d]),
      .wfull(fifo_wfull[d]), .almost_full(almost_full[d]), .overrun(overrun[d])
    );
  end

  word_counter #(.WIDTH(2)) u_wcnt (
    .clk, .rst_n, .clr(1'b0), .en(wcnt_en), .count(wcnt), .last()
  );
  word_counter #(.WIDTH(2)) u_rcnt (
    .clk, .rst_n, .clr(1'b0), .en(rcnt_en), .count(rcnt), .last()
  );

  shared_ram #(.WORDS(RAM_WORDS), .W(WORD_W)) u_ram (
    .clk,
    .we(ram_we), .waddr({ram_wslot, wcnt}), .wdata(data),
    .re(ram_re), .raddr({ram_rslot, rcnt}), .rdata(dl_data)
  );

  assign ev_return = apf_push;

  a_wcnt_aligned: assert property (@(posedge clk) disable iff (!rst_n) ram_we |-> wcnt == tim.ul_word)
    else $error("beam_switch: write counter out of step with the bus");

endmodule
