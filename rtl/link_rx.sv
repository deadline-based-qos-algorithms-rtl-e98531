// link_rx: ingress stage of a host or switch port. It checks the header CRC and
// rebuilds the packet's deadline in this node's time base (D = TTD + Tlocal), then
// registers the packet for the port buffer.
//
// A packet with a wrong CRC is dropped: it is not forwarded, crc_err pulses, and its
// buffer units are reported on drop_units so that the port can return the credits the
// sender spent on it. Interface: link_in (header carries TTD), t_local, out_valid /
// out_hdr (absolute local deadline, one cycle after the packet arrived), crc_err,
// drop_units (same cycle as crc_err).
//
// Deadline reconstruction from the TTD follows the document. Dropping on a CRC error
// and returning its credits are this design's choices; the document does not say
// what happens to a corrupted header.
module link_rx
  import edf_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  link_t           link_in,
  input  time_t           t_local,
  output logic            out_valid,
  output hdr_t            out_hdr,
  output logic            crc_err,
  output logic [1:0][UNITW-1:0] drop_units
);
  logic crc_ok;
  hdr_t h;

  assign crc_ok = (hdr_crc(link_in.hdr) == link_in.hdr.crc);

  always_comb begin
    h    = link_in.hdr;
    h.dl = link_in.hdr.dl + t_local;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_hdr    <= '0;
      crc_err    <= 1'b0;
      drop_units <= '0;
    end else begin
      out_valid  <= link_in.valid && crc_ok;
      crc_err    <= link_in.valid && !crc_ok;
      drop_units <= '0;
      if (link_in.valid && !crc_ok)
        drop_units[link_in.hdr.vc] <= pkt_units(link_in.hdr.len);
      if (link_in.valid) out_hdr <= h;
    end
  end
endmodule
