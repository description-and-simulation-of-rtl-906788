// shared_ram -- dual-port Shared RAM of one beam (10k x 32 b by default).
//
// Stores the data words of every subpacket switched to this beam, whatever its
// dwell. A subpacket occupies four consecutive words: the upper address bits
// are the subpacket address taken from the address pool, the two low bits come
// from a word counter. One port writes uplink words, the other reads downlink
// words; both may be used every clock. Read data is registered (one clock
// after re). Reading and writing the same word in one clock returns the old
// word.
module shared_ram #(
  parameter int unsigned WORDS = 10240,
  parameter int unsigned W     = 32
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic                     re,
  input  logic [$clog2(WORDS)-1:0] raddr,
  output logic [W-1:0]             rdata
);

  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
