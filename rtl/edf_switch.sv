// edf_switch: an NP-port switch with deadline-based scheduling, combined input and
// output buffers and a crossbar between them.
//
// Input port: link_rx rebuilds each packet's deadline from its TTD and the switch's
// own clock and checks the header CRC; the packet then waits in an input voq_buffer,
// which keeps one queue per output port (VC 0 as ordered + take-over queue pairs,
// VC 1 as FIFOs) in a shared 8-Kbyte memory per VC. Crossbar: the voq_allocator
// moves per cycle at most one packet per input and per output, by earliest deadline
// among the per-output queue heads, regulated VC first, and only into output buffer
// space that is free. Output port: a port_buffer (one queue pair / FIFO per VC),
// a link_scheduler (regulated priority, credits for the downstream buffer,
// link serialisation) and link_tx (new TTD, next hop, new CRC). The switch keeps no
// per-flow state: it schedules with the deadline and the route in the header alone.
//
// Interface per port: link_in / credit_out (towards the upstream sender: units freed
// in the input buffer), link_out / credit_in (from the downstream receiver).
// Timing: link_rx, the input buffer, the output buffer and link_tx each add one
// register stage; a packet that finds every queue empty leaves four cycles after it
// arrives. Event outputs (one bit per port) feed
// statistics.
//
// What follows the document: 16 ports, 8 Kbytes per VC in each buffer, the buffer
// organisation, virtual output queues at the inputs, EDF over queue heads, deadline
// reconstruction and TTD. This design's choices: a crossbar that moves one header
// per cycle per port (the payload is not stored, only its length is accounted) and a
// single request-grant-accept round per cycle.
module edf_switch
  import edf_pkg::*;
#(
  parameter int unsigned NP       = 16,
  parameter int unsigned NSLOT    = VC_UNITS,
  parameter time_t       CLK_INIT = '0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  link_t   [NP-1:0]   link_in,
  output credit_t [NP-1:0]   credit_out,
  output link_t   [NP-1:0]   link_out,
  input  credit_t [NP-1:0]   credit_in,
  output logic    [NP-1:0]   ev_in_takeover,    // input buffer put a packet in its take-over queue
  output logic    [NP-1:0]   ev_out_takeover,   // output buffer put a packet in its take-over queue
  output logic    [NP-1:0]   ev_overtake,       // an output buffer sent from its take-over queue
  output logic    [NP-1:0]   ev_crc_err,
  output logic    [NP-1:0]   ev_stall_credit,
  output logic    [NP-1:0]   ev_vc1_held,
  output logic    [NP-1:0]   ev_xbar_lost
);
  time_t t_local;

  always_ff @(posedge clk) begin
    if (!rst_n) t_local <= CLK_INIT;
    else        t_local <= t_local + time_t'(1);
  end

  logic [NP-1:0]            rx_valid;
  hdr_t [NP-1:0]            rx_hdr;
  logic [NP-1:0][1:0][UNITW-1:0] rx_drop;
  logic [NP-1:0][NP-1:0][1:0] in_head_valid;   // [input][output][vc]
  hdr_t [NP-1:0][NP-1:0][1:0] in_head_hdr;
  logic [NP-1:0][1:0]       in_pop;
  logic [NP-1:0][$clog2(NP)-1:0] in_port;
  credit_t [NP-1:0]         in_popped;

  logic [NP-1:0]            xb_push;
  hdr_t [NP-1:0]            xb_hdr;
  logic [NP-1:0][1:0][UNITW-1:0] out_free;
  logic [NP-1:0][1:0]       out_head_valid;
  hdr_t [NP-1:0][1:0]       out_head_hdr;
  logic [NP-1:0][1:0]       out_pop;
  logic [NP-1:0]            tx_valid;
  hdr_t [NP-1:0]            tx_hdr;

  for (genvar p = 0; p < NP; p++) begin : g_port
    link_rx u_rx (
      .clk, .rst_n,
      .link_in(link_in[p]), .t_local,
      .out_valid(rx_valid[p]), .out_hdr(rx_hdr[p]),
      .crc_err(ev_crc_err[p]), .drop_units(rx_drop[p])
    );

    voq_buffer #(.NP(NP), .NSLOT(NSLOT)) u_in_buf (
      .clk, .rst_n,
      .in_valid(rx_valid[p]), .in_hdr(rx_hdr[p]),
      .head_valid(in_head_valid[p]), .head_hdr(in_head_hdr[p]),
      .pop(in_pop[p]), .pop_port(in_port[p]),
      .popped_units(in_popped[p]),
      .to_takeover(ev_in_takeover[p]), .from_takeover()
    );

    always_comb begin
      for (int v = 0; v < 2; v++)
        credit_out[p].units[v] = in_popped[p].units[v] + rx_drop[p][v];
    end

    port_buffer #(.NSLOT(NSLOT)) u_out_buf (
      .clk, .rst_n,
      .in_valid(xb_push[p]), .in_hdr(xb_hdr[p]),
      .head_valid(out_head_valid[p]), .head_hdr(out_head_hdr[p]),
      .pop(out_pop[p]), .free_units(out_free[p]),
      .popped_units(),
      .to_takeover(ev_out_takeover[p]), .from_takeover(ev_overtake[p])
    );

    link_scheduler #(.INIT_CREDITS(NSLOT)) u_sched (
      .clk, .rst_n,
      .head_valid(out_head_valid[p]), .head_hdr(out_head_hdr[p]),
      .pop(out_pop[p]), .credit_in(credit_in[p]),
      .tx_valid(tx_valid[p]), .tx_hdr(tx_hdr[p]),
      .stall_credit(ev_stall_credit[p]), .vc1_held(ev_vc1_held[p]), .busy()
    );

    link_tx #(.ADVANCE_HOP(1'b1)) u_tx (
      .clk, .rst_n,
      .in_valid(tx_valid[p]), .in_hdr(tx_hdr[p]), .t_local,
      .link_out(link_out[p])
    );
  end

  voq_allocator #(.NP(NP)) u_alloc (
    .head_valid(in_head_valid), .head_hdr(in_head_hdr),
    .out_free, .in_pop, .in_port,
    .out_push(xb_push), .out_hdr(xb_hdr),
    .lost(ev_xbar_lost)
  );
endmodule
