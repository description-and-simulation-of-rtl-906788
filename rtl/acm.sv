// acm -- Address Control Memory: ping-pong pair of address RAMs.
//
// Each entry holds the Shared RAM subpacket address of one stored subpacket
// plus its multicast flag. During a subframe, bank wbank is written
// sequentially, one entry per subpacket accepted, and waddr tells which entry
// the next write will use (the value the Dwell FIFOs store). The other bank,
// written during the previous subframe, is read at random addresses supplied
// by the Dwell FIFOs; this random read is what performs the temporal
// switching. swap (subframe start) restarts the write pointer at 0. The
// multicast flag read back tells the processor to hold a multicast address
// out of the address pool until the last dwell has sent it.
//
// Read data is registered (one clock after re).
module acm #(
  parameter int unsigned DEPTH = 2560,  // entries per bank
  parameter int unsigned SA_W  = 12     // Shared RAM subpacket address width
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     swap,
  input  logic                     wbank,
  input  logic                     we,
  input  logic [SA_W-1:0]          wslot,   // Shared RAM subpacket address
  input  logic                     wmc,     // multicast flag
  output logic [$clog2(DEPTH)-1:0] waddr,   // entry the next write uses
  output logic                     full,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [SA_W-1:0]          rslot,
  output logic                     rmc
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned PW = $clog2(DEPTH + 1);
  localparam int unsigned MW = $clog2(2 * DEPTH);

  logic [SA_W:0] mem [2*DEPTH];   // bank 0 in 0..DEPTH-1, bank 1 above
  logic [MW-1:0] mwaddr, mraddr;
  logic [PW-1:0] wptr_q, wptr;

  assign wptr  = swap ? '0 : wptr_q;
  assign waddr = wptr[AW-1:0];
  assign full  = wptr == PW'(DEPTH);
  assign mwaddr = MW'(waddr) + (wbank ? MW'(DEPTH) : '0);
  assign mraddr = MW'(raddr) + (wbank ? '0 : MW'(DEPTH));

  always_ff @(posedge clk) begin
    if (we && !full) mem[mwaddr] <= {wmc, wslot};
    if (re) {rmc, rslot} <= mem[mraddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          wptr_q <= '0;
    else if (we && !full) wptr_q <= wptr + 1'b1;
    else                 wptr_q <= wptr;
  end

  a_no_write_full: assert property (@(posedge clk) disable iff (!rst_n) we |-> !full)
    else $error("acm: write into full bank");

endmodule
