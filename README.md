# Shared-memory-per-beam packet switch for a processing satellite

This is synthesizable SystemVerilog for the information-switching processor of a
regenerative communication satellite. User terminals send fixed-size packets on
many uplink channels. The switch stores each packet and sends it out again on
the downlink beam and dwell (a time window of a beam aimed at one ground area)
named in the packet's header. Both single-destination and multicast traffic are
supported.

The main idea is that **every downlink beam has its own shared memory**, shared
by that beam's eight dwells, and that a packet is reached through a
**double pointer**:

```
Dwell FIFO entry  ->  ACM entry  ->  Shared RAM subpacket location  ->  4 data words
(per dwell queue)     (per subframe,    (taken from the Address Pool FIFO,
                       ping-pong)        returned after transmission)
```

Writing is sequential in arrival order. Reading is in dwell order. Everything is
fully synchronous to one clock.

## Frames, subframes and subpackets

| quantity | value |
|---|---|
| packet | 2048 bits, as 16 subpackets of 128 bits |
| subpacket | 4 words of 32 bits |
| frame | 16 subframes (32 ms, so 2 ms per subframe) |
| subframe 0 | header subframe: each uplink slot carries its user's header subpacket |
| subframes 1..15 | data subframes: each slot carries one data subpacket |
| uplink slots per subframe | `UL_SLOTS` = 8192 (the 524 Mb/s bus); 256 in the reduced test set |
| downlink slots per subframe | `DL_SLOTS` = 2500 (160 Mb/s per beam); 80 in the reduced test set |
| beams x dwells | 8 x 8 |

An uplink slot belongs to the same user for a whole frame. The header received
in subframe 0 routes that user's 15 data subpackets in subframes 1..15. The
downlink lags the uplink by exactly one subframe. What is stored during subframe
*s* is sent during subframe *s+1*.

Header subpacket, words 0 and 1, most significant bit first. Words 2 and 3 are
ignored.

```
word 0: busy/idle[4] frame[4] subframe[4] user[8] word[4] beam_enable[8]
word 1: dwell[4]     frame[4] subframe[4] zero[7] multicast[1] word[4] beam_enable[8]
```

A header is busy when its busy/idle field is non-zero. `beam_enable` selects one
or more downlink beams; this is spatial switching. `dwell` (low three bits) selects
the dwell within each enabled beam; this is temporal switching. `multicast` sends
the subpacket to all eight dwells of every enabled beam.

## Structure

```
isp (top)
 ├─ synch                 frame/subframe/slot/word counters, downlink word strobe
 ├─ tdm_bus               header decoding, per-slot destination table, 1-clock register stage
 └─ beam_switch  x 8      one per downlink beam
     ├─ dwell_header_decoder   which Dwell FIFOs a subpacket goes to
     ├─ processor              accept/drop, ping-pong control, dwell schedule, address return
     ├─ apf                    Address Pool FIFO: free Shared RAM locations
     ├─ acm                    Address Control Memory, two banks
     ├─ dwell_fifo x 8         ping-pong queues of ACM entry numbers
     ├─ word_counter x 2       RAM word-address bits for the write and read ports
     └─ shared_ram             10240 x 32 dual-port RAM (2560 subpackets)
```

`isp_pkg` holds the shared constants and the types `hdr_w0_t`, `hdr_w1_t`,
`dest_t` and `timing_t`.

## Writing a subpacket (uplink)

On the first word of a data subpacket, `tdm_bus` supplies the slot's stored
destination. In each beam whose enable bit is set, the subpacket is accepted
when all of these hold:

- the address pool is not empty;
- the ACM write bank is not full;
- every target Dwell FIFO has room.

If it is accepted, then in that same clock:

1. the head of the APF (a free location *L*) is popped;
2. word 0 is written to RAM address {*L*, 2'b00}, and words 1..3 follow on the next clocks;
3. {*L*, multicast} is written to the next sequential ACM entry *k* of the write bank;
4. *k* is pushed into the destination Dwell FIFO, or into all eight for multicast.

If it is not accepted, the subpacket is dropped and `ev_drop` pulses.

## Reading a subpacket (downlink)

The `synch` block produces exactly `4*DL_SLOTS` downlink word strobes in each
subframe. They are spread evenly by a fractional accumulator. Downlink slots are
handed to the dwells in order. Dwell 0 owns the first `dwell_len[0]` slots, dwell
1 the next `dwell_len[1]`, and so on. Slots past the sum of the lengths are
idle. The dwell lengths are per beam, and are loaded from the `dwell_len`
inputs at every frame start, so they can change frame by frame. After reset,
each length is `DL_SLOTS/8`.

At the first strobe of a slot, the current dwell's FIFO (its read bank) is
popped. If that bank is empty, the slot goes out idle (`dl_valid` low). A popped
entry runs through a three-stage registered pipeline:

| clock | action |
|---|---|
| t | pop the Dwell FIFO (gives ACM entry *k*) |
| t+1 | read ACM read bank at *k* (gives location *L* and multicast flag) |
| t+2, +strobes | read RAM {*L*, word}, word from the read counter |
| t+3 | word on `dl_data` with `dl_valid`, `dl_dwell`, `dl_word`, `dl_slot` |

Seen from the top-level `timing` output, a downlink word leaves four clocks after
its strobe. The extra clock is the `tdm_bus` register stage.

## Multicast and the address pool

This is the subtle part of the design. A location goes back to the APF after its
fourth word has been read, but only if it will not be read again:

- **single destination:** returned at once;
- **multicast:** all eight Dwell FIFOs hold the same ACM entry, so the location is
  returned only when **dwell 7** (the last dwell served) reads it. Reads by dwells
  0..6 pulse `ev_mc_hold` instead.

If a multicast location were returned early, the APF could hand it to a new
uplink subpacket before the remaining dwells had sent it. That would corrupt the
downlink. `tb_beam_switch` checks every downlink word for this.

The APF starts full. Instead of loading all 2560 addresses after reset, it first
hands out a counter 0..N-1 and then switches to its circular store of returned
addresses. The behaviour is the same as a FIFO preloaded with 0..N-1.

## Ping-pong

The ACM and every Dwell FIFO have two banks. The write bank is the parity of
the current subframe, and the read bank is the other one. At each subframe start
(`tim.sf_start`), the bank about to be written is emptied and the ACM write
pointer restarts at 0. The ACM needs no clearing, because it is only read at
entries the FIFOs hand out. A Dwell FIFO bank is filled once and drained once per
subframe, so its pointers never wrap.

## Congestion monitoring

Congestion control itself is left to a network controller outside this RTL. The
switch gives that controller three kinds of signals, per beam:

- `almost_full[d]`: the write bank of a Dwell FIFO holds at least `FIFO_DEPTH-AF_MARGIN` entries;
- `ev_drop`: a subpacket was refused for lack of a free location, ACM entry or FIFO room;
- `overrun[d]`: at a swap, a Dwell FIFO bank still held entries, because its dwell time
  was shorter than the traffic queued for it.

Entries discarded by an overrun are lost, and so are their RAM locations (see
"Design choices and limits"). `free_slots` reports the free-location count of each beam.

## Top-level interface (`isp`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock (one uplink bus word per clock), asynchronous active-low reset |
| `ul_data[31:0]` | in | uplink bus word for the slot/word shown on `timing` in the same clock |
| `timing` | out | `timing_t`: `ul_word`, `ul_slot`, `subframe`, `frame`, `sf_start`, `frame_start`, `dl_strobe`, `dl_word`, `dl_slot` |
| `dwell_len[8][8]` | in | downlink slots per beam and dwell, loaded at frame start |
| `dl_strobe/valid/data/dwell/word/slot[8]` | out | downlink word stream of each beam |
| `almost_full[8]`, `overrun[8]` | out | per-dwell congestion flags of each beam |
| `ev_accept/ev_drop/ev_mc_hold/ev_return[8]` | out | event pulses of each beam |
| `free_slots[8]` | out | free Shared RAM locations of each beam |

The switch keeps its own time from reset. The source of `ul_data` must follow
the `timing` outputs, which are combinational from the counter registers.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `UL_SLOTS` | 8192 | uplink subpacket slots per subframe |
| `DL_SLOTS` | 2500 | downlink subpacket slots per subframe (must be ≤ `UL_SLOTS`) |
| `RAM_WORDS` | 10240 | Shared RAM words per beam (4 per subpacket) |
| `ACM_DEPTH` | `RAM_WORDS/4` | ACM entries per bank |
| `FIFO_DEPTH` | `DL_SLOTS` | Dwell FIFO entries per bank |
| `AF_MARGIN` | 8 | almost-full distance from full |

The reduced configuration used for the reference workload is `UL_SLOTS=256`,
`DL_SLOTS=80`, with dwell lengths of 10.

## Sizing at full rate

At the defaults, the slot counts match a 524 Mb/s uplink bus and a 160 Mb/s
downlink. The 10240-word RAM is another matter. At any moment a beam's RAM holds
the subpackets written this subframe plus those of the previous subframe not yet
sent. That is up to twice the per-subframe load. So 2560 locations carry at most
1280 subpackets per beam per subframe without drops, about half of a fully loaded
160 Mb/s beam. Heavier traffic is refused and shows up on `ev_drop`.

## Verification

Each testbench is self-checking and ends with a line of the form
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_isp` | Whole switch, 8 beams, reduced sizes (256/80), three frames. 27 uplink subpackets per subframe: 6 multicast and 21 single-destination. All 27 go to beam 0, which then sends 69 of its 80 downlink slots, with dwell usage from 60 to 100 %. Other beams are enabled at random. Beam 0's dwell times are re-programmed in frame 1, and one dwell of beam 4 is overloaded in frame 2. Every downlink word of every beam is compared with a prediction, beam 0 must send exactly 69 subpackets in every data subframe, and every downlink word must leave four clocks after its strobe. The counts of single, multicast, idle, swap, re-programming, multicast-hold, address-return, address-reuse, drop, overrun and almost-full events must all be non-zero. |
| `tb_isp_full` | The whole switch at its default sizes, two frames of random traffic (about 300 users, 20 % multicast). Every downlink word is checked. It takes about 5 s in Verilator. |
| `tb_beam_switch` | One beam fed through `synch` and `tdm_bus`. It first replays a ten-subpacket switching example (dwells 0, 7, M, 4, M, M, 2, 1, 1, 6) and checks each dwell's sequence, e.g. dwell 1 sends 3, 5, 6, 8, 9, along with the ACM contents. It then overloads a 24-location RAM and checks that drops happen and that no word sent is corrupt or misrouted. |
| `tb_synch`, `tb_tdm_bus`, `tb_dwell_header_decoder`, `tb_dwell_fifo`, `tb_acm`, `tb_apf`, `tb_shared_ram`, `tb_word_counter` | Unit tests against reference models. |

`tb_isp_full`, `tb_isp` and `tb_beam_switch` share their stimulus and scoreboard
through `tb/isp_checker.sv`. To run a test with Verilator, from the directory
that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/isp_pkg.sv tb/tb_isp.sv --top-module tb_isp
./obj_dir/Vtb_isp
```

Concurrent assertions in `dwell_fifo`, `acm`, `apf`, `processor` and
`beam_switch` check the handshake rules. They cover: no push into a full bank, no
pop from an empty one, no more addresses returned than exist, and the write
counter staying in step with the bus.

## Design choices and limits

These points are this implementation's own choices, not taken from a reference:

- **Timing.** One clock is one uplink word time. The downlink strobe comes from a
  fractional accumulator rather than a separate downlink clock.
- **Header field widths.** The widths of header word 1 (seven zero bits plus the
  multicast bit) are one reading of the packet format. The busy encoding is also
  a choice.
- **Drops.** The accept/drop rule and the drop, overrun and almost-full signals are
  this design's. Only the almost-full flags come from the description.
- **Overrun leak.** Entries left unread at a swap are discarded, and their RAM
  locations are never returned. The network controller must keep each dwell's
  load within its dwell length. If the last dwell is overrun, multicast locations
  leak as well.
- **Unchecked dwell lengths.** Nothing checks that the lengths of a beam add up to
  at most `DL_SLOTS`. Dwells beyond the end of the subframe are cut short.
- **Frame counter.** The frame number is the 4-bit field of the header format, and
  it wraps after 16 frames.
- **Not included.** The uplink receivers, the downlink modulators and the network
  controller are not part of this RTL. Their signals are the top-level ports.
