// dwell_header_decoder -- Dwell FIFO write-enable generator for one beam.
//
// At the first word of each data subpacket on the TDM bus, checks whether the
// subpacket is busy and enabled for this beam (spatial switching). If so it
// requests a write into the Dwell FIFO of the destination dwell, or into all
// eight Dwell FIFOs when the multicast bit is set: multicast is a broadcast to
// every dwell of the beam. The output is combinational; the processor ANDs it
// with its own accept decision before the FIFOs are written.
module dwell_header_decoder
  import isp_pkg::*;
#(
  parameter int unsigned BEAM_ID = 0
) (
  input  dest_t       dest,       // destination of the current slot
  input  logic        sp_first,   // first word of a data subpacket
  output logic        beam_hit,   // subpacket is for this beam
  output dwell_mask_t dwell_we    // requested Dwell FIFO writes
);

  always_comb begin
    beam_hit = sp_first && dest.busy && dest.beam_en[BEAM_ID];
    dwell_we = '0;
    if (beam_hit) begin
      if (dest.multicast) dwell_we = '1;
      else                dwell_we[dest.dwell] = 1'b1;
    end
  end

endmodule
