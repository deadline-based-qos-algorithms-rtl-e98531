// host_injection: the injection queues of an end-host interface, organised as the
// same two virtual channels as the network.
//
// Regulated VC (VC 0): two queues, one feeding the other. The first keeps packets in
// order of eligible time; as soon as its head becomes eligible (eligible time not
// after the host clock) the packet moves, one per cycle, into the second queue,
// which keeps packets in order of deadline and offers its head for injection. This
// smooths bursts: a video frame's packets enter the network spread out along their
// deadlines instead of all at once. Best-effort VC (VC 1): one queue in order of
// deadline, so several best-effort flows can be given different shares through the
// bandwidth used to compute their deadlines.
//
// Interface: pkt_valid/pkt_ready/pkt from the deadline stamper; head_valid/head_hdr
// per VC (combinational) and pop per VC towards the link scheduler, which sends
// best-effort packets only when the regulated VC has nothing ready. t_local is the
// host clock. ev_elig_wait flags a cycle in which the regulated head waits for its
// eligible time.
//
// The queue arrangement follows the document; queue depths are this design's
// choice.
module host_injection
  import edf_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  time_t      t_local,
  input  logic       pkt_valid,
  output logic       pkt_ready,
  input  host_pkt_t  pkt,
  output logic [1:0] head_valid,
  output hdr_t [1:0] head_hdr,
  input  logic [1:0] pop,
  output logic       ev_elig_wait
);
  logic      el_ready, el_valid, dq_ready, be_ready, move;
  host_pkt_t el_head, dq_head, be_head;

  assign pkt_ready = pkt.hdr.vc ? be_ready : el_ready;

  sorted_queue #(.DEPTH(DEPTH), .KEY_ELIG(1'b1)) u_elig_q (
    .clk, .rst_n,
    .push(pkt_valid && pkt_ready && !pkt.hdr.vc), .push_pkt(pkt), .push_ready(el_ready),
    .head_valid(el_valid), .head_pkt(el_head), .pop(move), .cnt()
  );

  assign move         = el_valid && !dl_before(t_local, el_head.elig) && dq_ready;
  assign ev_elig_wait = el_valid && dl_before(t_local, el_head.elig);

  sorted_queue #(.DEPTH(DEPTH), .KEY_ELIG(1'b0)) u_dl_q (
    .clk, .rst_n,
    .push(move), .push_pkt(el_head), .push_ready(dq_ready),
    .head_valid(head_valid[0]), .head_pkt(dq_head), .pop(pop[0]), .cnt()
  );

  sorted_queue #(.DEPTH(DEPTH), .KEY_ELIG(1'b0)) u_be_q (
    .clk, .rst_n,
    .push(pkt_valid && pkt_ready && pkt.hdr.vc), .push_pkt(pkt), .push_ready(be_ready),
    .head_valid(head_valid[1]), .head_pkt(be_head), .pop(pop[1]), .cnt()
  );

  assign head_hdr[0] = dq_head.hdr;
  assign head_hdr[1] = be_head.hdr;
endmodule
