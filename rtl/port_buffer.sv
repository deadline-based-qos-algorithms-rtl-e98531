// port_buffer: the buffer of one switch port (input or output side), organised as
// two virtual channels.
//
// VC allocation steers an arriving packet by its header's VC bit. VC 0 (regulated
// traffic) is a takeover_vc: queue allocation places the packet in the ordered or
// the take-over queue, and the head offered is the smaller-deadline one of the two
// queue heads. VC 1 (best-effort) is one FIFO. The reader sees one head per VC and
// pops one of them at a time; which VC it takes (the MUX) is decided outside, by the
// crossbar allocator at an input or by the link scheduler at an output.
//
// Occupancy is counted per VC in 128-byte buffer units, so the block also reports
// free_units for the internal flow control of the crossbar, and popped_units, the
// units released this cycle, which an input buffer returns upstream as credits.
// Interface: in_valid/in_hdr (absolute deadline), head/pop per VC; all heads are
// combinational and a packet written in one cycle can be read in the next.
//
// The structure follows the document's buffer figure (VC allocation, queue
// allocation, take-over and ordered queues, common queue). Unit accounting and
// the one-pop-per-cycle reader are this design's choices.
module port_buffer
  import edf_pkg::*;
#(
  parameter int unsigned NSLOT = VC_UNITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  hdr_t                 in_hdr,
  output logic [1:0]           head_valid,
  output hdr_t [1:0]           head_hdr,
  input  logic [1:0]           pop,
  output logic [1:0][UNITW-1:0] free_units,
  output credit_t              popped_units,
  output logic                 to_takeover,    // arriving packet placed in the take-over queue
  output logic                 from_takeover   // VC 0 pop taken from the take-over queue
);
  logic [1:0][UNITW-1:0] used_units;
  logic [1:0]            push;

  assign push[0] = in_valid && !in_hdr.vc;
  assign push[1] = in_valid &&  in_hdr.vc;

  takeover_vc #(.NSLOT(NSLOT)) u_vc0 (
    .clk, .rst_n,
    .push(push[0]), .push_hdr(in_hdr),
    .head_valid(head_valid[0]), .head_hdr(head_hdr[0]),
    .pop(pop[0]), .cnt(),
    .push_u(to_takeover), .pop_u(from_takeover)
  );

  fifo_queue #(.DEPTH(NSLOT)) u_vc1 (
    .clk, .rst_n,
    .push(push[1]), .push_hdr(in_hdr),
    .head_valid(head_valid[1]), .head_hdr(head_hdr[1]),
    .pop(pop[1]), .cnt()
  );

  always_comb begin
    for (int v = 0; v < 2; v++) begin
      popped_units.units[v] = pop[v] ? pkt_units(head_hdr[v].len) : '0;
      free_units[v]         = UNITW'(NSLOT) - used_units[v];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      used_units <= '0;
    end else begin
      for (int v = 0; v < 2; v++)
        used_units[v] <= used_units[v]
                         + (push[v] ? pkt_units(in_hdr.len) : UNITW'(0))
                         - popped_units.units[v];
    end
  end

  a_one_pop: assert property (@(posedge clk) disable iff (!rst_n) !(pop[0] && pop[1]));
  a_space: assert property (@(posedge clk) disable iff (!rst_n)
                            in_valid |-> pkt_units(in_hdr.len) <= free_units[in_hdr.vc]);
endmodule
