// link_tx: egress stage of a host or switch port. It turns the packet's absolute
// local deadline into a time-to-deadline (TTD = D - Tlocal), advances the source-route
// pointer when the node is a switch, recomputes the header CRC and registers the
// result onto the link.
//
// Because TTD is relative, the sender's and receiver's clocks never need to agree:
// the receiver adds its own clock back (link_rx). The CRC must be recomputed at every
// hop because the TTD field (and the hop pointer) change at every hop.
// Interface: in_valid/in_hdr (absolute deadline), t_local (this node's clock),
// link_out (registered, one cycle after in_valid).
//
// TTD and per-hop CRC recomputation follow the document. The hop pointer, the CRC
// polynomial and the single register stage are this design's choices.
module link_tx
  import edf_pkg::*;
#(
  parameter bit ADVANCE_HOP = 1'b1   // 1 in a switch, 0 in a host
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  hdr_t  in_hdr,
  input  time_t t_local,
  output link_t link_out
);
  hdr_t h;

  always_comb begin
    h     = in_hdr;
    h.dl  = in_hdr.dl - t_local;
    if (ADVANCE_HOP) h.hop = in_hdr.hop + HOPW'(1);
    h.crc = hdr_crc(h);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      link_out <= '0;
    end else begin
      link_out.valid <= in_valid;
      if (in_valid) link_out.hdr <= h;
    end
  end
endmodule
