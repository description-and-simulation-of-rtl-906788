// apf -- Address Pool FIFO: free Shared RAM subpacket addresses.
//
// At start-up every Shared RAM subpacket address is free. Instead of loading
// N addresses after reset, the pool hands out a "fresh" counter 0..N-1 first
// and only then the circular FIFO of addresses returned by the downlink; the
// behaviour is that of a FIFO that starts full with 0..N-1. head is the next
// free address (first-word fall-through); pop takes it. push returns an
// address once its subpacket has been sent on every dwell it was queued for.
// Push and pop may happen in the same clock. count is the number of free
// addresses.
module apf #(
  parameter int unsigned N = 2560   // Shared RAM subpacket locations
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     pop,
  output logic [$clog2(N)-1:0]     head,
  output logic                     empty,
  input  logic                     push,
  input  logic [$clog2(N)-1:0]     push_addr,
  output logic [$clog2(N+1)-1:0]   count
);

  localparam int unsigned AW = $clog2(N);
  localparam int unsigned CW = $clog2(N + 1);

  logic [AW-1:0] mem [N];
  logic [CW-1:0] fresh_q;    // next never-used address; N when all handed out
  logic [AW-1:0] rptr_q, wptr_q;
  logic [CW-1:0] used_q;     // returned addresses waiting in the circular FIFO
  logic          from_fresh;

  assign from_fresh = fresh_q != CW'(N);
  assign head       = from_fresh ? fresh_q[AW-1:0] : mem[rptr_q];
  assign empty      = !from_fresh && (used_q == '0);
  assign count      = (CW'(N) - fresh_q) + used_q;

  always_ff @(posedge clk) begin
    if (push) mem[wptr_q] <= push_addr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fresh_q <= '0;
      rptr_q  <= '0;
      wptr_q  <= '0;
      used_q  <= '0;
    end else begin
      if (push) wptr_q <= (wptr_q == AW'(N - 1)) ? '0 : wptr_q + 1'b1;
      if (pop && !empty && from_fresh) fresh_q <= fresh_q + 1'b1;
      if (pop && !empty && !from_fresh) rptr_q <= (rptr_q == AW'(N - 1)) ? '0 : rptr_q + 1'b1;
      used_q <= used_q + CW'(push) - CW'(pop && !empty && !from_fresh);
    end
  end

  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("apf: pop from empty pool");
  a_no_overfill: assert property (@(posedge clk) disable iff (!rst_n) push |-> count < CW'(N) || pop)
    else $error("apf: more addresses returned than exist");

endmodule
