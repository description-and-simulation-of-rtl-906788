// tb_beam_switch -- one beam's switch, driven through synch and tdm_bus.
//
// Frame 0 replays the ten-subpacket switching example of the design (dwells
// 0, 7, multicast, 4, multicast, multicast, 2, 1, 1, 6) in every data
// subframe and checks each dwell's downlink sequence, e.g. dwell 1 must send
// subpackets 3, 5, 6, 8, 9 in that order, and that the ACM entries 0..9 point
// at the ten RAM locations handed out by the address pool in order.
// Frame 1 overloads the beam (40 subpackets per subframe into a 24-location
// RAM): subpackets must be dropped, and every word that is still sent must be
// intact and belong to the dwell it is sent on (no location reused early).
`timescale 1ns/1ps
module tb_beam_switch;
  import isp_pkg::*;
  localparam int unsigned UL = 40, DL = 40, RAMW = 96, FD = 8;
  localparam int unsigned LEN_W = $clog2(DL + 1);

  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  timing_t tim, tim_q;
  word_t   ul_data, data_q;
  dest_t   dest_q;
  logic [LEN_W-1:0] dwell_len [NUM_DWELLS];
  logic dl_strobe, dl_valid, ev_accept, ev_drop, ev_mc_hold, ev_return;
  word_t dl_data;
  dwell_t dl_dwell;
  logic [1:0] dl_word;
  logic [15:0] dl_slot;
  dwell_mask_t almost_full, overrun;
  logic [$clog2(RAMW / 4 + 1)-1:0] free_slots;

  synch #(.UL_SLOTS(UL), .DL_SLOTS(DL)) u_synch (.clk, .rst_n, .tim);
  tdm_bus #(.UL_SLOTS(UL)) u_bus (.clk, .rst_n, .tim, .ul_data, .tim_q, .data_q, .dest_q, .hdr_we());
  beam_switch #(.BEAM_ID(0), .DL_SLOTS(DL), .RAM_WORDS(RAMW), .FIFO_DEPTH(FD)) dut (
    .clk, .rst_n, .tim(tim_q), .data(data_q), .dest(dest_q), .dwell_len, .*);

  // user headers per frame
  dest_t hdr [2][UL];
  int unsigned fig_dwell [10] = '{0, 7, 8, 4, 8, 8, 2, 1, 1, 6};   // 8 = multicast
  int unsigned fig_out   [NUM_DWELLS][$];
  int unsigned checks = 0, failures = 0;
  int unsigned n_fig = 0, n_drop = 0, n_sent1 = 0, n_mchold = 0;

  initial begin
    fig_out[0] = '{1, 3, 5, 6};    fig_out[1] = '{3, 5, 6, 8, 9};
    fig_out[2] = '{3, 5, 6, 7};    fig_out[3] = '{3, 5, 6};
    fig_out[4] = '{3, 4, 5, 6};    fig_out[5] = '{3, 5, 6};
    fig_out[6] = '{3, 5, 6, 10};   fig_out[7] = '{2, 3, 5, 6};
    for (int u = 0; u < UL; u++) begin
      hdr[0][u] = '0;
      if (u < 10) hdr[0][u] = '{busy: 1'b1, beam_en: 8'h01, dwell: dwell_t'(fig_dwell[u] % 8), multicast: fig_dwell[u] == 8};
      hdr[1][u] = '{busy: 1'b1, beam_en: 8'h01 | beam_mask_t'($urandom), dwell: dwell_t'($urandom),
                    multicast: ($urandom % 4) == 0};
    end
  end

  assign dwell_len = '{default: LEN_W'(DL / NUM_DWELLS)};

  always_comb begin
    dest_t h;
    h = hdr[tim.frame[0]][tim.ul_slot];
    if (tim.subframe == 0)
      case (tim.ul_word)
        2'd0:    ul_data = hdr_w0_t'{busy: {3'b0, h.busy}, frame: tim.frame, subframe: '0, user: 8'(tim.ul_slot), word: '0, beam_en: h.beam_en};
        2'd1:    ul_data = hdr_w1_t'{dwell: {1'b0, h.dwell}, frame: tim.frame, subframe: '0, zero: '0, multicast: h.multicast, word: 4'd1, beam_en: h.beam_en};
        default: ul_data = '0;
      endcase
    else
      ul_data = {tim.frame, tim.subframe, 14'(tim.ul_slot), tim.ul_word, 8'hA5};
  end

  // downlink checking
  int unsigned strobes = 0;
  int unsigned pos [NUM_DWELLS];
  always @(posedge clk) if (rst_n) begin
    if (ev_drop) n_drop++;
    if (ev_mc_hold) n_mchold++;
    if (dl_strobe) begin
      int unsigned g, f, s, u;
      g = strobes / (4 * DL);       // downlink subframe since reset
      strobes++;
      if (dl_slot == 0 && dl_word == 0) pos = '{default: 0};
      if (g >= 2 && g < SUBFRAMES + 1) begin
        // frame 0, data of uplink subframe g-1: the switching example
        if (dl_word == 0) begin
          int unsigned d, k;
          d = dl_slot / (DL / NUM_DWELLS);
          k = dl_slot % (DL / NUM_DWELLS);
          checks++;
          if (dl_valid != (k < fig_out[d].size()) ||
              (dl_valid && (dl_data[23:10] != 14'(fig_out[d][k] - 1) || dl_dwell != dwell_t'(d)))) begin
            failures++;
            $display("FAIL dl-subframe %0d dwell %0d position %0d: valid %0d user %0d", g, d, k, dl_valid, dl_data[23:10] + 1);
          end else if (dl_valid) n_fig++;
        end
      end
      if (dl_valid) begin
        // integrity: the word is the right word of a subpacket of the previous subframe for this dwell
        f = dl_data[31:28]; s = dl_data[27:24]; u = dl_data[23:10];
        checks++;
        if (dl_data[7:0] != 8'hA5 || dl_data[9:8] != dl_word || (f * SUBFRAMES + s + 1) != g ||
            !hdr[f % 2][u].busy || !(hdr[f % 2][u].multicast || hdr[f % 2][u].dwell == dl_dwell)) begin
          failures++;
          $display("FAIL dl-subframe %0d: corrupt or misrouted word %h on dwell %0d", g, dl_data, dl_dwell);
        end
        if (f == 1 && dl_word == 0) n_sent1++;
      end
    end
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // after the first data subframe ACM bank 1 holds the ten RAM addresses in order
    wait (tim_q.subframe == 2);
    for (int k = 0; k < 10; k++) begin
      checks++;
      if (dut.u_acm.mem[RAMW / 4 + k][4:0] != 5'(k) || dut.u_acm.mem[RAMW / 4 + k][5] != (fig_dwell[k] == 8)) begin
        failures++; $display("FAIL: ACM entry %0d = %h", k, dut.u_acm.mem[RAMW / 4 + k]);
      end
    end
    repeat (2 * SUBFRAMES * UL * 4) @(posedge clk);
    $display("switching example subpackets checked=%0d, frame-1 subpackets sent=%0d, dropped=%0d, multicast holds=%0d",
             n_fig, n_sent1, n_drop, n_mchold);
    checks++;
    if (n_fig != 15 * 31 || n_drop == 0 || n_sent1 == 0 || n_mchold == 0) begin
      failures++; $display("FAIL: expected mechanisms not seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3 * SUBFRAMES * UL * 4) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
