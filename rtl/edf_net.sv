// edf_net: a complete deadline-scheduled network in its smallest form: NP end-host
// interfaces, each attached to one port of an NP-port edf_switch.
//
// Host h sends through switch port h and receives from it; a packet's route entry 0
// names the destination port. Every node runs its own clock from a different start
// value (host h from h * 100003, the switch from 2^32 - 65536, close to wrap-around),
// so the whole path works only because deadlines cross links as times-to-deadline
// and are compared wrap-safe. Credits flow back on every link in both directions.
//
// Interface: per host, flow configuration (cfg_*), application messages (msg_*),
// received packets (rx_valid, rx_hdr with the deadline in that host's time base) and
// the host's clock (host_time); event bits from every host and switch port for
// statistics.
//
// Host interfaces, switch, two VCs, take-over queues and TTD follow the document.
// The single-switch star is this design's own arrangement: the document evaluates a
// 128-endpoint multistage network of such switches.
module edf_net
  import edf_pkg::*;
#(
  parameter int unsigned NP     = 16,
  parameter int unsigned NSLOT  = VC_UNITS,
  parameter int unsigned NFLOWS = 16,
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned MSGW   = 20
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic      [NP-1:0]                  cfg_we,
  input  logic      [NP-1:0][$clog2(NFLOWS)-1:0] cfg_flow,
  input  flow_cfg_t [NP-1:0]                  cfg_data,
  input  logic      [NP-1:0]                  msg_valid,
  output logic      [NP-1:0]                  msg_ready,
  input  logic      [NP-1:0][$clog2(NFLOWS)-1:0] msg_flow,
  input  logic      [NP-1:0][MSGW-1:0]        msg_bytes,
  output logic      [NP-1:0]                  rx_valid,
  output hdr_t      [NP-1:0]                  rx_hdr,
  output time_t     [NP-1:0]                  host_time,
  // host events
  output logic      [NP-1:0]                  ev_divide,
  output logic      [NP-1:0]                  ev_elig_wait,
  output logic      [NP-1:0]                  ev_host_stall_credit,
  output logic      [NP-1:0]                  ev_host_vc1_held,
  output logic      [NP-1:0]                  ev_host_crc_err,
  // switch events
  output logic      [NP-1:0]                  ev_in_takeover,
  output logic      [NP-1:0]                  ev_out_takeover,
  output logic      [NP-1:0]                  ev_overtake,
  output logic      [NP-1:0]                  ev_sw_crc_err,
  output logic      [NP-1:0]                  ev_sw_stall_credit,
  output logic      [NP-1:0]                  ev_sw_vc1_held,
  output logic      [NP-1:0]                  ev_xbar_lost
);
  link_t   [NP-1:0] up_link, down_link;
  credit_t [NP-1:0] up_credit, down_credit;

  for (genvar h = 0; h < NP; h++) begin : g_host
    host_interface #(
      .NFLOWS(NFLOWS), .DEPTH(DEPTH), .INIT_CREDITS(NSLOT), .MSGW(MSGW),
      .CLK_INIT(time_t'(h * 100003)), .SRC_ID(h)
    ) u_host (
      .clk, .rst_n,
      .cfg_we(cfg_we[h]), .cfg_flow(cfg_flow[h]), .cfg_data(cfg_data[h]),
      .msg_valid(msg_valid[h]), .msg_ready(msg_ready[h]),
      .msg_flow(msg_flow[h]), .msg_bytes(msg_bytes[h]),
      .link_out(up_link[h]), .credit_in(up_credit[h]),
      .link_in(down_link[h]), .credit_out(down_credit[h]),
      .rx_valid(rx_valid[h]), .rx_hdr(rx_hdr[h]), .t_local(host_time[h]),
      .ev_divide(ev_divide[h]), .ev_elig_wait(ev_elig_wait[h]),
      .ev_stall_credit(ev_host_stall_credit[h]), .ev_vc1_held(ev_host_vc1_held[h]),
      .ev_crc_err(ev_host_crc_err[h])
    );
  end

  edf_switch #(.NP(NP), .NSLOT(NSLOT), .CLK_INIT(32'hFFFF_0000)) u_switch (
    .clk, .rst_n,
    .link_in(up_link), .credit_out(up_credit),
    .link_out(down_link), .credit_in(down_credit),
    .ev_in_takeover, .ev_out_takeover, .ev_overtake,
    .ev_crc_err(ev_sw_crc_err), .ev_stall_credit(ev_sw_stall_credit),
    .ev_vc1_held(ev_sw_vc1_held), .ev_xbar_lost
  );
endmodule
