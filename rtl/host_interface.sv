// host_interface: the network interface of an end host. It turns application
// messages into deadline-tagged packets, injects them into the network in deadline
// order, and receives the packets addressed to the host.
//
// Transmit path: deadline_stamper (flow table, segmentation, deadline and eligible
// time) -> host_injection (eligible-time queue feeding a deadline queue for the
// regulated VC, a deadline queue for the best-effort VC) -> link_scheduler (regulated
// VC first, credits for the first switch's input buffer, link serialisation) ->
// link_tx (TTD and header CRC). The host's route field is left untouched; the first
// switch uses route entry 0. Receive path: link_rx checks the CRC and rebuilds the
// deadline in the host's own time base; the packet is handed out on rx_valid/rx_hdr
// and, since the host consumes it at once, its buffer units go straight back to the
// switch on credit_out.
//
// Interface: flow configuration (cfg_*), messages (msg_*), the link pair
// (link_out/credit_in towards the switch, link_in/credit_out from it), received
// packets (rx_valid, rx_hdr with an absolute local deadline), t_local (the host's
// clock, free-running from CLK_INIT) and event bits for statistics.
//
// The pipeline of stamping, two-stage regulated queueing, priority injection and TTD
// follows the document. Queue depths, immediate consumption at the receiver and the
// clock's start value are this design's choices.
module host_interface
  import edf_pkg::*;
#(
  parameter int unsigned NFLOWS       = 16,
  parameter int unsigned DEPTH        = 16,
  parameter int unsigned ELIG_OFFSET  = 2500,
  parameter int unsigned INIT_CREDITS = VC_UNITS,
  parameter int unsigned MSGW         = 20,
  parameter time_t       CLK_INIT     = '0,
  parameter int unsigned SRC_ID       = 0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cfg_we,
  input  logic [$clog2(NFLOWS)-1:0] cfg_flow,
  input  flow_cfg_t                 cfg_data,
  input  logic                      msg_valid,
  output logic                      msg_ready,
  input  logic [$clog2(NFLOWS)-1:0] msg_flow,
  input  logic [MSGW-1:0]           msg_bytes,
  output link_t                     link_out,
  input  credit_t                   credit_in,
  input  link_t                     link_in,
  output credit_t                   credit_out,
  output logic                      rx_valid,
  output hdr_t                      rx_hdr,
  output time_t                     t_local,
  output logic                      ev_divide,
  output logic                      ev_elig_wait,
  output logic                      ev_stall_credit,
  output logic                      ev_vc1_held,
  output logic                      ev_crc_err
);
  always_ff @(posedge clk) begin
    if (!rst_n) t_local <= CLK_INIT;
    else        t_local <= t_local + time_t'(1);
  end

  logic       st_valid, st_ready;
  host_pkt_t  st_pkt;
  logic [1:0] hv, pop;
  hdr_t [1:0] hh;
  logic       tx_valid;
  hdr_t       tx_hdr;
  logic [1:0][UNITW-1:0] drop;

  deadline_stamper #(.NFLOWS(NFLOWS), .ELIG_OFFSET(ELIG_OFFSET), .MSGW(MSGW), .SRC_ID(SRC_ID)) u_stamp (
    .clk, .rst_n, .t_local,
    .cfg_we, .cfg_flow, .cfg_data,
    .msg_valid, .msg_ready, .msg_flow, .msg_bytes,
    .pkt_valid(st_valid), .pkt_ready(st_ready), .pkt(st_pkt),
    .ev_divide
  );

  host_injection #(.DEPTH(DEPTH)) u_inj (
    .clk, .rst_n, .t_local,
    .pkt_valid(st_valid), .pkt_ready(st_ready), .pkt(st_pkt),
    .head_valid(hv), .head_hdr(hh), .pop, .ev_elig_wait
  );

  link_scheduler #(.INIT_CREDITS(INIT_CREDITS)) u_sched (
    .clk, .rst_n,
    .head_valid(hv), .head_hdr(hh), .pop, .credit_in,
    .tx_valid, .tx_hdr,
    .stall_credit(ev_stall_credit), .vc1_held(ev_vc1_held), .busy()
  );

  link_tx #(.ADVANCE_HOP(1'b0)) u_tx (
    .clk, .rst_n, .in_valid(tx_valid), .in_hdr(tx_hdr), .t_local, .link_out
  );

  link_rx u_rx (
    .clk, .rst_n, .link_in, .t_local,
    .out_valid(rx_valid), .out_hdr(rx_hdr),
    .crc_err(ev_crc_err), .drop_units(drop)
  );

  always_comb begin
    for (int v = 0; v < 2; v++)
      credit_out.units[v] = drop[v]
                            + ((rx_valid && rx_hdr.vc == 1'(v)) ? pkt_units(rx_hdr.len) : UNITW'(0));
  end
endmodule
