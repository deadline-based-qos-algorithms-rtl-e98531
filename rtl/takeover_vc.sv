// takeover_vc: the regulated virtual channel of a port buffer, built from two FIFO
// queues that share one slot memory: the ordered queue (L) and the take-over queue (U).
//
// Enqueue: a packet goes to L when both queues are empty or when its deadline is not
// earlier than the deadline of the last packet in L; otherwise it goes to U. So L is
// always in deadline order and its tail holds the largest deadline in the VC.
// Dequeue: the head offered to the reader is L's head, or U's head when U's head has
// a strictly earlier deadline. A low-deadline packet that arrives behind a
// high-deadline one can thus overtake it, while packets of one flow (whose
// deadlines increase) never leave out of order. U is never non-empty while L is
// empty; an assertion checks this.
//
// Both queues are linked lists in one NSLOT-entry memory, so either may grow to the
// whole VC. Free slots are kept in a bitmap and the lowest free one is allocated.
// Interface: push/push_hdr (the caller guarantees space through credits; pushing
// into a full VC is an assertion failure), head_valid/head_hdr (combinational, the
// chosen head), pop (removes head_hdr). One push and one pop per cycle; a pushed
// packet is visible at the head from the next cycle. Status: cnt (packets held),
// push_u (this push goes to U), pop_u (this pop takes U's head).
//
// Enqueue and dequeue rules, the shared memory and the "U only" impossibility follow
// the document. The tie rule (L wins equal deadlines), the linked-list memory and
// the slot count are this design's choices.
module takeover_vc
  import edf_pkg::*;
#(
  parameter int unsigned NSLOT = VC_UNITS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  hdr_t push_hdr,
  output logic head_valid,
  output hdr_t head_hdr,
  input  logic pop,
  output logic [$clog2(NSLOT+1)-1:0] cnt,
  output logic push_u,
  output logic pop_u
);
  localparam int unsigned IW = $clog2(NSLOT);
  localparam int unsigned CW = $clog2(NSLOT+1);

  hdr_t          mem [NSLOT];
  logic [IW-1:0] nxt [NSLOT];
  logic [NSLOT-1:0] free_map;

  logic [IW-1:0] head_l, tail_l, head_u, tail_u;
  logic [CW-1:0] cnt_l, cnt_u;
  time_t         tail_dl_l;

  logic          l_nonempty, u_nonempty;
  logic          take_u;
  logic          pop_l;
  logic          l_empty_after, u_empty_after;
  logic          to_l;
  logic [IW-1:0] alloc;

  assign l_nonempty = (cnt_l != '0);
  assign u_nonempty = (cnt_u != '0);

  // Dequeue choice: U's head only when strictly earlier than L's head.
  assign take_u     = u_nonempty && (!l_nonempty || dl_before(mem[head_u].dl, mem[head_l].dl));
  assign head_valid = l_nonempty || u_nonempty;
  assign head_hdr   = take_u ? mem[head_u] : mem[head_l];
  assign pop_u      = pop && take_u;
  assign pop_l      = pop && !take_u;

  assign l_empty_after = (cnt_l == '0) || (cnt_l == CW'(1) && pop_l);
  assign u_empty_after = (cnt_u == '0) || (cnt_u == CW'(1) && pop_u);

  // Enqueue choice.
  assign to_l   = l_empty_after || !dl_before(push_hdr.dl, tail_dl_l);
  assign push_u = push && !to_l;

  // Lowest free slot.
  always_comb begin
    alloc = '0;
    for (int i = NSLOT - 1; i >= 0; i--)
      if (free_map[i]) alloc = IW'(i);
  end

  assign cnt = cnt_l + cnt_u;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      free_map  <= '1;
      head_l    <= '0;
      tail_l    <= '0;
      head_u    <= '0;
      tail_u    <= '0;
      cnt_l     <= '0;
      cnt_u     <= '0;
      tail_dl_l <= '0;
    end else begin
      // Dequeue.
      if (pop_l) begin
        head_l <= nxt[head_l];
        free_map[head_l] <= 1'b1;
      end
      if (pop_u) begin
        head_u <= nxt[head_u];
        free_map[head_u] <= 1'b1;
      end
      // Enqueue.
      if (push) begin
        free_map[alloc] <= 1'b0;
        if (to_l) begin
          if (l_empty_after) head_l <= alloc;
          tail_l    <= alloc;
          tail_dl_l <= push_hdr.dl;
        end else begin
          if (u_empty_after) head_u <= alloc;
          tail_u <= alloc;
        end
      end
      cnt_l <= cnt_l + CW'(push && to_l) - CW'(pop_l);
      cnt_u <= cnt_u + CW'(push && !to_l) - CW'(pop_u);
    end
  end

  // Packet memory and link pointers: no reset needed, an entry is read only after
  // it was written.
  logic          link_we;
  logic [IW-1:0] link_at;
  assign link_we = push && (to_l ? !l_empty_after : !u_empty_after);
  assign link_at = to_l ? tail_l : tail_u;

  always_ff @(posedge clk) begin
    if (push)    mem[alloc]   <= push_hdr;
    if (link_we) nxt[link_at] <= alloc;
  end

  // Rules of the queue pair.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  push |-> (free_map != '0));
  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                   pop |-> head_valid);
  a_u_only: assert property (@(posedge clk) disable iff (!rst_n)
                             !(cnt_l == '0 && cnt_u != '0));
endmodule
