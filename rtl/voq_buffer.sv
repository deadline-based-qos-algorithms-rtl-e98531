// voq_buffer: switch input buffer with virtual output queues, for both virtual
// channels.
//
// An arriving packet is steered by its VC bit into one of two voq_vc channels: VC 0
// (regulated) keeps an ordered / take-over queue pair per output port, VC 1
// (best-effort) one FIFO per output port. The crossbar allocator therefore sees, for
// every output and VC, the packet this input would send there next, so a packet
// whose output is busy no longer blocks packets bound elsewhere. Each channel holds
// 8 Kbytes, shared by all its per-output queues.
//
// Occupancy is counted per VC in 128-byte units; popped_units (units released this
// cycle) is what the input returns upstream as credits. Interface: in_valid/in_hdr
// (absolute deadline, route pointing at this switch's output), head_valid/head_hdr
// per output and VC (combinational), pop per VC with pop_port (at most one pop per
// cycle). A packet written in one cycle can be read in the next.
//
// Per-output queues at the inputs and the regulated VC's queue pair follow the
// document; the unit accounting and one pop per cycle are this design's choices.
module voq_buffer
  import edf_pkg::*;
#(
  parameter int unsigned NP    = 16,
  parameter int unsigned NSLOT = VC_UNITS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  hdr_t                    in_hdr,
  output logic [NP-1:0][1:0]      head_valid,
  output hdr_t [NP-1:0][1:0]      head_hdr,
  input  logic [1:0]              pop,
  input  logic [$clog2(NP)-1:0]   pop_port,
  output credit_t                 popped_units,
  output logic                    to_takeover,    // arriving packet placed in a take-over queue
  output logic                    from_takeover   // VC 0 pop taken from a take-over queue
);
  logic [1:0][UNITW-1:0] used_units;
  logic [1:0]            push;
  logic [1:0][NP-1:0]    hv;
  hdr_t [1:0][NP-1:0]    hh;

  assign push[0] = in_valid && !in_hdr.vc;
  assign push[1] = in_valid &&  in_hdr.vc;

  voq_vc #(.NP(NP), .NSLOT(NSLOT), .TAKEOVER(1'b1)) u_vc0 (
    .clk, .rst_n,
    .push(push[0]), .push_hdr(in_hdr),
    .head_valid(hv[0]), .head_hdr(hh[0]),
    .pop(pop[0]), .pop_port, .cnt(),
    .push_u(to_takeover), .pop_u(from_takeover)
  );

  voq_vc #(.NP(NP), .NSLOT(NSLOT), .TAKEOVER(1'b0)) u_vc1 (
    .clk, .rst_n,
    .push(push[1]), .push_hdr(in_hdr),
    .head_valid(hv[1]), .head_hdr(hh[1]),
    .pop(pop[1]), .pop_port, .cnt(),
    .push_u(), .pop_u()
  );

  always_comb begin
    for (int o = 0; o < NP; o++)
      for (int v = 0; v < 2; v++) begin
        head_valid[o][v] = hv[v][o];
        head_hdr[o][v]   = hh[v][o];
      end
    for (int v = 0; v < 2; v++)
      popped_units.units[v] = pop[v] ? pkt_units(hh[v][pop_port].len) : '0;
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
                            in_valid |-> pkt_units(in_hdr.len) <= UNITW'(NSLOT) - used_units[in_hdr.vc]);
endmodule
