// isp_checker -- traffic generator and scoreboard for the whole switch.
//
// Generates the uplink TDM bus from the switch's own timing outputs: in the
// header subframe each slot carries the header subpacket of one user (busy,
// beam-enable mask, dwell, multicast bit), in the 15 data subframes the
// active users' data subpackets. Every data word encodes frame, subframe,
// user and word number so each downlink word can be traced to its source.
//
// The scoreboard predicts, for every beam and downlink subframe, which
// subpacket must go out in every downlink slot: dwell d owns dwell_len[d]
// consecutive slots, and sends the subpackets queued for it in the previous
// uplink subframe in uplink slot order. A subpacket is dropped when a Dwell
// FIFO it targets already holds FIFO_DEPTH entries; queued subpackets beyond
// the dwell length are lost at the next swap. The prediction for downlink
// subframe g is made in the middle of uplink subframe g-1.
//
// PAPER_WORKLOAD=1 runs the reference scenario: 27 users per subframe, 6
// multicast and 21 single-destination, all enabled for beam 0 (69 of its 80
// downlink slots busy, dwell usage 60 to 100 %), extra beams enabled at
// random; dwell times of beam 0 re-programmed in frame 1; an overload of one
// dwell of beam 4 in frame 2 to raise almost-full, drop and overrun.
// Otherwise about 300 users with random masks run at the given sizes.
// Mechanism counters are printed; with REQUIRE_ALL each must be non-zero.
module isp_checker
  import isp_pkg::*;
#(
  parameter int unsigned UL_SLOTS       = 8192,
  parameter int unsigned DL_SLOTS       = 2500,
  parameter int unsigned FIFO_DEPTH     = 2500,
  parameter int unsigned RAM_SLOTS      = 2560,
  parameter int unsigned N_FRAMES       = 3,
  parameter bit          PAPER_WORKLOAD = 1'b0,
  parameter bit          REQUIRE_ALL    = 1'b0,
  localparam int unsigned LEN_W  = $clog2(DL_SLOTS + 1),
  localparam int unsigned FREE_W = $clog2(RAM_SLOTS + 1)
) (
  input  logic             clk,
  output logic             rst_n,
  output word_t            ul_data,
  input  timing_t          timing,
  output logic [LEN_W-1:0] dwell_len   [NUM_BEAMS][NUM_DWELLS],
  input  logic             dl_strobe   [NUM_BEAMS],
  input  logic             dl_valid    [NUM_BEAMS],
  input  word_t            dl_data     [NUM_BEAMS],
  input  dwell_t           dl_dwell    [NUM_BEAMS],
  input  logic [1:0]       dl_word     [NUM_BEAMS],
  input  logic [15:0]      dl_slot     [NUM_BEAMS],
  input  dwell_mask_t      almost_full [NUM_BEAMS],
  input  dwell_mask_t      overrun     [NUM_BEAMS],
  input  logic             ev_accept   [NUM_BEAMS],
  input  logic             ev_drop     [NUM_BEAMS],
  input  logic             ev_mc_hold  [NUM_BEAMS],
  input  logic             ev_return   [NUM_BEAMS],
  input  logic [FREE_W-1:0] free_slots [NUM_BEAMS]
);

  localparam int unsigned NF = N_FRAMES + 1;

  // per-frame user table and dwell lengths
  logic       u_busy  [NF][UL_SLOTS];
  beam_mask_t u_beams [NF][UL_SLOTS];
  dwell_t     u_dwell [NF][UL_SLOTS];
  logic       u_mc    [NF][UL_SLOTS];
  int unsigned lenf   [NF][NUM_BEAMS][NUM_DWELLS];

  // expected downlink, double-buffered by downlink subframe parity
  logic        e_valid [2][NUM_BEAMS][DL_SLOTS];
  int unsigned e_user  [2][NUM_BEAMS][DL_SLOTS];
  dwell_t      e_dwell [2][NUM_BEAMS][DL_SLOTS];
  logic        e_mc    [2][NUM_BEAMS][DL_SLOTS];
  int unsigned e_frame [2];
  int unsigned e_sf    [2];

  int unsigned checks, failures;
  int unsigned dl_count [NUM_BEAMS];
  int unsigned gsub;          // global uplink subframe index
  // mechanism counters
  int unsigned n_single, n_mcast, n_idle, n_multibeam, n_swap, n_lenchg;
  int unsigned n_mchold, n_return, n_drop, n_overrun, n_afull, n_accept_b0;
  int unsigned acc_total [NUM_BEAMS];
  logic [3:0]  strobe_sr;      // synch strobes of the last four clocks
  int unsigned b0_sent, n_b0_subframes;

  function automatic word_t data_word(int unsigned f, int unsigned s, int unsigned u, int unsigned w);
    return {4'(f), 4'(s), 14'(u), 2'(w), 8'hA5};
  endfunction

  // ---------------- workload ----------------
  initial begin
    int unsigned cnt [NUM_DWELLS];
    for (int f = 0; f < NF; f++) begin
      for (int u = 0; u < UL_SLOTS; u++) begin
        u_busy[f][u] = 1'b0; u_beams[f][u] = '0; u_dwell[f][u] = '0; u_mc[f][u] = 1'b0;
      end
      for (int b = 0; b < NUM_BEAMS; b++)
        for (int d = 0; d < NUM_DWELLS; d++) lenf[f][b][d] = DL_SLOTS / NUM_DWELLS;
      if (PAPER_WORKLOAD) begin
        // singles per dwell 4,4,4,3,3,2,1,0 rotated by frame: 21 singles
        for (int d = 0; d < NUM_DWELLS; d++) cnt[(d + f) % NUM_DWELLS] = (d < 3) ? 4 : (d < 5) ? 3 : (d == 5) ? 2 : (d == 6) ? 1 : 0;
        for (int u = 0; u < 6; u++) begin
          u_busy[f][u] = 1'b1; u_mc[f][u] = 1'b1;
          u_beams[f][u] = beam_mask_t'($urandom) | 8'h01;
          u_dwell[f][u] = dwell_t'($urandom);
        end
        begin
          int u = 6;
          for (int d = 0; d < NUM_DWELLS; d++)
            for (int k = 0; k < cnt[d]; k++) begin
              u_busy[f][u] = 1'b1; u_dwell[f][u] = dwell_t'(d);
              u_beams[f][u] = beam_mask_t'($urandom) | 8'h01;
              u++;
            end
        end
        if (f == 1) // adjustable dwell times: beam 0 lengths fit its demand
          for (int d = 0; d < NUM_DWELLS; d++) lenf[f][0][d] = 6 + cnt[d] + ((d == 0) ? 11 : 0);
        if (f == 2) // overload beam 4, dwell 3
          for (int u = 27; u < 41; u++) begin
            u_busy[f][u] = 1'b1; u_dwell[f][u] = 3'd3; u_beams[f][u] = 8'h10;
          end
      end else begin
        for (int u = 0; u < 300 && u < UL_SLOTS; u++) begin
          u_busy[f][u]  = 1'b1;
          u_mc[f][u]    = ($urandom % 5) == 0;
          u_dwell[f][u] = dwell_t'($urandom);
          u_beams[f][u] = beam_mask_t'($urandom);
        end
      end
    end
  end

  // ---------------- uplink TDM bus ----------------
  always_comb begin
    int unsigned f, u;
    f = timing.frame;
    u = timing.ul_slot;
    if (f >= NF) f = NF - 1;
    for (int b = 0; b < NUM_BEAMS; b++)
      for (int d = 0; d < NUM_DWELLS; d++) dwell_len[b][d] = LEN_W'(lenf[f][b][d]);
    if (timing.subframe == 0) begin
      case (timing.ul_word)
        2'd0:    ul_data = hdr_w0_t'{busy: u_busy[f][u] ? 4'h1 : 4'h0, frame: 4'(f), subframe: 4'd0,
                                     user: 8'(u), word: 4'd0, beam_en: u_beams[f][u]};
        2'd1:    ul_data = hdr_w1_t'{dwell: 4'(u_dwell[f][u]), frame: 4'(f), subframe: 4'd0, zero: '0,
                                     multicast: u_mc[f][u], word: 4'd1, beam_en: u_beams[f][u]};
        default: ul_data = 32'hDEAD_0000 | 32'(u);
      endcase
    end else begin
      ul_data = u_busy[f][u] ? data_word(f, timing.subframe, u, timing.ul_word) : 32'h0;
    end
  end

  // ---------------- prediction ----------------
  task automatic predict(int unsigned g_next, int unsigned f, int unsigned s);
    int unsigned bufi, fl, q;
    int unsigned fill [NUM_DWELLS];
    int unsigned qu   [NUM_DWELLS][$];
    bufi = g_next % 2;
    fl = g_next / SUBFRAMES;
    if (fl >= NF) fl = NF - 1;
    e_frame[bufi] = f;
    e_sf[bufi]    = s;
    for (int b = 0; b < NUM_BEAMS; b++) begin
      for (int d = 0; d < NUM_DWELLS; d++) begin fill[d] = 0; qu[d].delete(); end
      if (s != 0)
        for (int u = 0; u < UL_SLOTS; u++)
          if (u_busy[f][u] && u_beams[f][u][b]) begin
            logic ok;
            ok = 1'b1;
            for (int d = 0; d < NUM_DWELLS; d++)
              if ((u_mc[f][u] || u_dwell[f][u] == d) && fill[d] >= FIFO_DEPTH) ok = 1'b0;
            if (ok) begin
              acc_total[b]++;
              for (int d = 0; d < NUM_DWELLS; d++)
                if (u_mc[f][u] || u_dwell[f][u] == d) begin fill[d]++; qu[d].push_back(u); end
            end
          end
      q = 0;
      for (int d = 0; d < NUM_DWELLS; d++)
        for (int k = 0; k < lenf[fl][b][d]; k++) begin
          if (q < DL_SLOTS) begin
            e_valid[bufi][b][q] = k < qu[d].size();
            e_user[bufi][b][q]  = (k < qu[d].size()) ? qu[d][k] : 0;
            e_mc[bufi][b][q]    = (k < qu[d].size()) ? u_mc[f][qu[d][k]] : 1'b0;
            e_dwell[bufi][b][q] = dwell_t'(d);
          end
          q++;
        end
      for (; q < DL_SLOTS; q++) e_valid[bufi][b][q] = 1'b0;
    end
  endtask

  initial begin
    for (int i = 0; i < 2; i++) begin
      e_frame[i] = 0; e_sf[i] = 0;
      for (int b = 0; b < NUM_BEAMS; b++)
        for (int q = 0; q < DL_SLOTS; q++) begin
          e_valid[i][b][q] = 1'b0; e_user[i][b][q] = 0; e_dwell[i][b][q] = '0; e_mc[i][b][q] = 1'b0;
        end
    end
  end

  // ---------------- reset, counters, checking ----------------
  initial begin
    checks = 0; failures = 0; gsub = 0;
    n_single = 0; n_mcast = 0; n_idle = 0; n_multibeam = 0; n_swap = 0; n_lenchg = 0;
    n_mchold = 0; n_return = 0; n_drop = 0; n_overrun = 0; n_afull = 0; n_accept_b0 = 0;
    for (int b = 0; b < NUM_BEAMS; b++) begin dl_count[b] = 0; acc_total[b] = 0; end
    b0_sent = 0; n_b0_subframes = 0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

  // downlink words must leave exactly four clocks after their strobe
  always @(posedge clk) begin
    strobe_sr <= rst_n ? {strobe_sr[2:0], timing.dl_strobe} : '0;
    if (rst_n)
      for (int b = 0; b < NUM_BEAMS; b++) begin
        checks++;
        if (dl_strobe[b] != strobe_sr[3]) begin
          failures++; $display("FAIL beam %0d: downlink strobe not four clocks after the timing strobe", b);
        end
      end
  end

  always @(posedge clk) if (rst_n) begin
    if (timing.sf_start) begin
      if (timing.subframe != 0 || timing.frame != 0 || gsub != 0) gsub++;
      n_swap++;
    end
    if (timing.ul_word == 2'd0 && timing.ul_slot == 16'(UL_SLOTS / 2))
      predict(gsub + 1, timing.frame, timing.subframe);
    for (int b = 0; b < NUM_BEAMS; b++) begin
      if (ev_mc_hold[b]) n_mchold++;
      if (ev_return[b])  n_return++;
      if (ev_drop[b])    n_drop++;
      if (ev_accept[b] && b == 0) n_accept_b0++;
      if (overrun[b] != '0)     n_overrun++;
      if (almost_full[b] != '0) n_afull++;
      if (dl_strobe[b]) begin
        int unsigned g, pos, bi, q, w;
        g   = dl_count[b] / (4 * DL_SLOTS);
        pos = dl_count[b] % (4 * DL_SLOTS);
        q   = pos / 4;
        w   = pos % 4;
        bi  = g % 2;
        if (PAPER_WORKLOAD && b == 0 && pos == 0 && g > 0) begin
          // reference workload: 69 of 80 slots busy on beam 0 in every data subframe
          checks++;
          if (b0_sent != ((g < 2 || (g - 2) % SUBFRAMES == 0) ? 0 : 69)) begin
            failures++; $display("FAIL: beam 0 sent %0d subpackets in downlink subframe %0d", b0_sent, g - 1);
          end
          if (b0_sent == 69) n_b0_subframes++;
          b0_sent = 0;
        end
        if (b == 0 && w == 0 && dl_valid[b]) b0_sent++;
        dl_count[b]++;
        checks++;
        if (dl_slot[b] != 16'(q) || dl_word[b] != 2'(w)) begin
          failures++;
          $display("FAIL beam %0d: downlink slot/word %0d/%0d, expected %0d/%0d", b, dl_slot[b], dl_word[b], q, w);
        end else if (dl_valid[b] != e_valid[bi][b][q]) begin
          failures++;
          $display("FAIL beam %0d dl-subframe %0d slot %0d word %0d: valid %0d, expected %0d (user %0d)",
                   b, g, q, w, dl_valid[b], e_valid[bi][b][q], e_user[bi][b][q]);
        end else if (dl_valid[b]) begin
          if (dl_data[b] != data_word(e_frame[bi], e_sf[bi], e_user[bi][b][q], w) || dl_dwell[b] != e_dwell[bi][b][q]) begin
            failures++;
            $display("FAIL beam %0d dl-subframe %0d slot %0d word %0d: data %h dwell %0d, expected %h dwell %0d",
                     b, g, q, w, dl_data[b], dl_dwell[b],
                     data_word(e_frame[bi], e_sf[bi], e_user[bi][b][q], w), e_dwell[bi][b][q]);
          end
          if (w == 0) begin
            if (e_mc[bi][b][q]) n_mcast++; else n_single++;
          end
        end else if (w == 0) n_idle++;
      end
    end
  end

  // ---------------- end of test ----------------
  initial begin
    logic [NUM_BEAMS-1:0] seen;
    for (int f = 0; f < NF; f++)
      for (int u = 0; u < UL_SLOTS; u++)
        if (u_busy[f][u] && $countones(u_beams[f][u]) > 1) n_multibeam++;
    for (int f = 1; f < NF; f++)
      for (int b = 0; b < NUM_BEAMS; b++)
        for (int d = 0; d < NUM_DWELLS; d++)
          if (lenf[f][b][d] != lenf[f-1][b][d]) n_lenchg++;
    wait (rst_n);
    repeat (N_FRAMES * SUBFRAMES * UL_SLOTS * WORDS_PER_SUBPKT + 16) @(posedge clk);
    $display("mechanisms: single=%0d multicast=%0d idle=%0d multibeam_users=%0d subframe_swaps=%0d",
             n_single, n_mcast, n_idle, n_multibeam, n_swap);
    $display("mechanisms: dwell_len_changes=%0d mc_hold=%0d apf_return=%0d apf_wraps_b0=%0d drop=%0d overrun=%0d almost_full=%0d",
             n_lenchg, n_mchold, n_return, acc_total[0] / RAM_SLOTS, n_drop, n_overrun, n_afull);
    if (PAPER_WORKLOAD) $display("beam 0 downlink subframes with 69 subpackets: %0d", n_b0_subframes);
    checks++;
    if (n_single == 0 || n_mcast == 0 || n_idle == 0 || n_swap == 0 || n_mchold == 0 || n_return == 0) begin
      failures++; $display("FAIL: a basic switching mechanism never happened");
    end
    if (REQUIRE_ALL) begin
      checks++;
      if (n_multibeam == 0 || (PAPER_WORKLOAD && n_b0_subframes == 0) || n_lenchg == 0 || n_drop == 0 || n_overrun == 0 || n_afull == 0 ||
          acc_total[0] <= RAM_SLOTS) begin
        failures++; $display("FAIL: a congestion, reprogramming or address-reuse mechanism never happened");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
