// sorted_queue: an end-host queue that keeps its packets sorted by a time key, the
// eligible time (KEY_ELIG = 1) or the deadline (KEY_ELIG = 0).
//
// The entries sit in a register array, earliest key at position 0. An arriving
// packet is inserted before the first entry whose key is later than its own, so
// packets with equal keys stay in arrival order, and the entries behind it move one
// place back; a pop shifts every entry one place forward. Keys are compared
// wrap-safe. Interface: push/push_pkt (push_ready when not full, or when a pop frees
// a place in the same cycle), head_valid/head_pkt (combinational), pop, cnt. One
// push and one pop per cycle.
//
// The document asks for host queues ordered by eligible time and by deadline; the
// insertion array, its depth and the tie rule are this design's choices. Such
// sorted storage is affordable in a host interface, unlike in a high-radix switch.
module sorted_queue
  import edf_pkg::*;
#(
  parameter int unsigned DEPTH    = 16,
  parameter bit          KEY_ELIG = 1'b0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      push,
  input  host_pkt_t push_pkt,
  output logic      push_ready,
  output logic      head_valid,
  output host_pkt_t head_pkt,
  input  logic      pop,
  output logic [$clog2(DEPTH+1)-1:0] cnt
);
  localparam int unsigned CW = $clog2(DEPTH+1);

  host_pkt_t q [DEPTH];
  host_pkt_t shifted [DEPTH];
  host_pkt_t nq [DEPTH];
  logic [CW-1:0] n_after_pop;
  logic [CW-1:0] pos;

  function automatic time_t key(host_pkt_t p);
    return KEY_ELIG ? p.elig : p.hdr.dl;
  endfunction

  assign head_valid = (cnt != '0);
  assign head_pkt   = q[0];
  assign push_ready = (cnt != CW'(DEPTH)) || pop;

  always_comb begin
    // Remove the head first.
    for (int i = 0; i < DEPTH; i++)
      shifted[i] = (pop && i < DEPTH - 1) ? q[i+1] : q[i];
    n_after_pop = cnt - CW'(pop);
    // Insertion point: first entry with a later key.
    pos = n_after_pop;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (CW'(i) < n_after_pop && dl_before(key(push_pkt), key(shifted[i])))
        pos = CW'(i);
    for (int i = 0; i < DEPTH; i++) begin
      if (!push || CW'(i) < pos) nq[i] = shifted[i];
      else if (CW'(i) == pos)    nq[i] = push_pkt;
      else                       nq[i] = shifted[i-1];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else begin
      cnt <= n_after_pop + CW'(push);
      for (int i = 0; i < DEPTH; i++) q[i] <= nq[i];
    end
  end

  a_push_ok: assert property (@(posedge clk) disable iff (!rst_n) push |-> push_ready);
  a_pop_ok:  assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid);
endmodule
