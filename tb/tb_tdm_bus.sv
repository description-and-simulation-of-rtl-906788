// tb_tdm_bus -- header decoding and destination store. A synch instance
// times the bus; random headers are sent in each header subframe and the
// destination attached to every data word of the following 15 subframes is
// compared with them, together with the one-clock delay of data and timing.
`timescale 1ns/1ps
module tb_tdm_bus;
  import isp_pkg::*;
  localparam int unsigned UL = 8;
  logic clk = 1'b0, rst_n, hdr_we;
  timing_t tim, tim_q, tim_d;
  word_t   ul_data, data_q, data_d;
  dest_t   dest_q;
  dest_t   hdr [2][UL];
  int unsigned checks = 0, failures = 0, n_busy = 0, n_mc = 0;
  always #5 clk = ~clk;

  synch #(.UL_SLOTS(UL), .DL_SLOTS(3)) u_synch (.clk, .rst_n, .tim);
  tdm_bus #(.UL_SLOTS(UL)) dut (.*);

  // header content per frame parity, fixed before the frame begins
  always_comb begin
    dest_t h;
    h = hdr[tim.frame[0]][tim.ul_slot];
    case ({tim.subframe == 0, tim.ul_word})
      3'b100:  ul_data = hdr_w0_t'{busy: {3'b0, h.busy}, frame: tim.frame, subframe: '0, user: 8'(tim.ul_slot), word: '0, beam_en: h.beam_en};
      3'b101:  ul_data = hdr_w1_t'{dwell: {1'b0, h.dwell}, frame: tim.frame, subframe: '0, zero: '0, multicast: h.multicast, word: 4'd1, beam_en: ~h.beam_en};
      default: ul_data = {tim.frame, tim.subframe, 8'(tim.ul_slot), 14'h0, tim.ul_word};
    endcase
  end

  initial begin
    for (int f = 0; f < 2; f++) for (int u = 0; u < UL; u++) hdr[f][u] = dest_t'($urandom);
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    for (int n = 0; n < 4 * SUBFRAMES * UL * 4; n++) begin
      tim_d = tim; data_d = ul_data;
      @(posedge clk);
      #1;
      checks++;
      if (tim_q != tim_d || data_q != data_d) begin failures++; $display("FAIL clock %0d: data/timing not delayed by one", n); end
      if (tim_q.subframe == 0) begin
        if (dest_q != '0) begin failures++; $display("FAIL: destination during header subframe"); end
        if (tim_q.ul_slot == UL - 1 && tim_q.ul_word == 3)
          hdr[~tim_q.frame[0]] = '{default: '0};
      end else begin
        dest_t e;
        e = hdr[tim_q.frame[0]][tim_q.ul_slot];
        if (dest_q != e) begin
          failures++; $display("FAIL clock %0d slot %0d: dest %h expected %h", n, tim_q.ul_slot, dest_q, e);
        end
        if (e.busy) n_busy++;
        if (e.multicast) n_mc++;
        // new random headers for the frame after next, once this frame's data are under way
        if (tim_q.subframe == 8 && tim_q.ul_word == 0)
          hdr[~tim_q.frame[0]][tim_q.ul_slot] = dest_t'($urandom);
      end
    end
    checks++;
    if (n_busy == 0 || n_mc == 0) begin failures++; $display("FAIL: no busy or multicast headers"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5 * SUBFRAMES * UL * 4) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
