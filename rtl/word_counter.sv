// word_counter -- Shared RAM word-address counter.
//
// The switch moves whole 128-bit subpackets, while the Shared RAM stores 32-bit
// words, so each subpacket occupies four consecutive RAM words. This counter
// supplies the two least significant RAM address bits: it advances by one on
// every word transferred (en) and wraps after the fourth word. clr forces it
// back to word 0. One instance serves the write port and one the read port.
// The count is registered: it changes on the clock edge after en.
module word_counter #(
  parameter int unsigned WIDTH = 2   // log2(words per subpacket)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  output logic [WIDTH-1:0] count,
  output logic             last      // count is at the final word
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   count <= '0;
    else if (clr) count <= '0;
    else if (en)  count <= count + 1'b1;
  end

  assign last = &count;

endmodule
