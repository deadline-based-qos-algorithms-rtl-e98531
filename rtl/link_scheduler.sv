// link_scheduler: the output multiplexer of a port. Each cycle the link is free it
// picks at most one packet from the two virtual channels and hands it to the egress
// stage.
//
// Regulated traffic (VC 0) has absolute priority: its head is sent whenever the
// downstream buffer has credits for it. Only that one VC 0 candidate is checked for
// credits. The source of the heads (a takeover_vc or a host deadline queue) already
// offers the smallest-deadline packet, so a larger-deadline packet that happens to
// fit the credits can never jump ahead of it. The best-effort head (VC 1) is sent
// only when VC 0 has nothing it can send. Credits are counted per VC in 128-byte
// units, start at the downstream buffer size and come back on credit_in. After a
// packet of L bytes the link stays busy for ceil(L/8) cycles (8 bytes per cycle).
//
// Interface: head_valid/head_hdr per VC in, pop per VC out (same cycle as
// tx_valid/tx_hdr), credit_in from the downstream receiver. Event outputs for
// statistics: stall_credit (a VC 0 head waits for credits), vc1_held (a sendable
// VC 1 head waits because VC 0 sends), busy (link serialising a packet).
//
// Absolute priority, credit flow control and the "only the smallest-deadline
// packet is checked for credits" rule follow the document. Letting VC 1 use the
// link while VC 0 lacks credits, the credit unit and the link timing are this
// design's choices.
module link_scheduler
  import edf_pkg::*;
#(
  parameter int unsigned INIT_CREDITS = VC_UNITS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] head_valid,
  input  hdr_t [1:0] head_hdr,
  output logic [1:0] pop,
  input  credit_t    credit_in,
  output logic       tx_valid,
  output hdr_t       tx_hdr,
  output logic       stall_credit,
  output logic       vc1_held,
  output logic       busy
);
  logic [1:0][UNITW-1:0] credits;
  logic [LENW-1:0]       busy_cnt;
  logic [1:0]            can_send;

  assign busy = (busy_cnt != '0);

  always_comb begin
    for (int v = 0; v < 2; v++)
      can_send[v] = head_valid[v] && (credits[v] >= pkt_units(head_hdr[v].len));
    pop = '0;
    if (!busy) begin
      if (can_send[0])      pop[0] = 1'b1;
      else if (can_send[1]) pop[1] = 1'b1;
    end
    tx_valid     = |pop;
    tx_hdr       = pop[1] ? head_hdr[1] : head_hdr[0];
    stall_credit = head_valid[0] && !can_send[0];
    vc1_held     = can_send[1] && pop[0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      credits  <= {2{UNITW'(INIT_CREDITS)}};
      busy_cnt <= '0;
    end else begin
      for (int v = 0; v < 2; v++)
        credits[v] <= credits[v] + credit_in.units[v]
                      - (pop[v] ? pkt_units(head_hdr[v].len) : UNITW'(0));
      if (tx_valid)  busy_cnt <= pkt_cycles(tx_hdr.len) - LENW'(1);
      else if (busy) busy_cnt <= busy_cnt - LENW'(1);
    end
  end

  a_credit_bound: assert property (@(posedge clk) disable iff (!rst_n)
                                   credits[0] <= UNITW'(INIT_CREDITS) && credits[1] <= UNITW'(INIT_CREDITS));
endmodule
