// dwell_fifo -- ping-pong Dwell FIFO of one downlink dwell.
//
// Holds ACM addresses (pointers to pointers into the Shared RAM) of the
// subpackets bound for one dwell. There are two banks: during a subframe the
// bank selected by wbank is written (from the uplink) while the other bank,
// filled during the previous subframe, is read by the downlink. At each
// subframe start (swap) the bank about to be written is emptied; if it still
// held unread entries, overrun pulses (the dwell time was too short for the
// traffic queued for it). almost_full flags the write bank reaching
// DEPTH-AF_MARGIN entries, a congestion monitor for the network controller.
//
// Because each bank is filled once and drained once per subframe, pointers
// never wrap: they only count up from zero. Read data is registered: rdata is
// valid the clock after pop. A push in the swap clock lands in entry 0 of the
// freshly emptied bank.
module dwell_fifo #(
  parameter int unsigned DEPTH     = 2500,  // entries per bank
  parameter int unsigned DW        = 12,    // ACM address width
  parameter int unsigned AF_MARGIN = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          swap,
  input  logic          wbank,
  input  logic          push,
  input  logic [DW-1:0] wdata,
  input  logic          pop,
  output logic [DW-1:0] rdata,
  output logic          rempty,
  output logic          wfull,
  output logic          almost_full,
  output logic          overrun
);

  localparam int unsigned PW = $clog2(DEPTH + 1);
  localparam int unsigned MW = $clog2(2 * DEPTH);

  logic [DW-1:0] mem [2*DEPTH];   // bank 0 in 0..DEPTH-1, bank 1 above
  logic [PW-1:0] wcnt [2];
  logic [PW-1:0] rcnt [2];
  logic          rbank;
  logic [PW-1:0] wptr;
  logic [MW-1:0] waddr, raddr;

  assign rbank       = ~wbank;
  assign waddr       = MW'(wptr) + (wbank ? MW'(DEPTH) : '0);
  assign raddr       = MW'(rcnt[rbank]) + (rbank ? MW'(DEPTH) : '0);
  assign wptr        = swap ? '0 : wcnt[wbank];
  assign rempty      = rcnt[rbank] == wcnt[rbank];
  assign wfull       = wptr == PW'(DEPTH);
  assign almost_full = wptr >= PW'(DEPTH - AF_MARGIN);
  assign overrun     = swap && (rcnt[wbank] != wcnt[wbank]);

  always_ff @(posedge clk) begin
    if (push && !wfull) mem[waddr] <= wdata;
    if (pop && !rempty) rdata <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt <= '{default: '0};
      rcnt <= '{default: '0};
    end else begin
      if (swap) rcnt[wbank] <= '0;
      wcnt[wbank] <= (push && !wfull) ? wptr + 1'b1 : wptr;
      if (pop && !rempty) rcnt[rbank] <= rcnt[rbank] + 1'b1;
    end
  end

  a_no_push_full: assert property (@(posedge clk) disable iff (!rst_n) push |-> !wfull)
    else $error("dwell_fifo: push into full bank");
  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !rempty)
    else $error("dwell_fifo: pop from empty bank");

endmodule
