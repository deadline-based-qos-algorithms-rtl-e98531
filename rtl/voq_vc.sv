// voq_vc: one virtual channel of a switch input buffer, organised as virtual output
// queues (VOQs): one queue per output port, all sharing one slot memory.
//
// A packet is filed under the output its route names at this hop. With TAKEOVER set
// (regulated VC), each per-output queue is an ordered / take-over queue pair: the
// packet joins the ordered queue (L) of its output when that queue is empty or its
// deadline is not earlier than the deadline of the last packet in L, and otherwise
// the take-over queue (U). The head offered for an output is U's head when it has a
// strictly earlier deadline than L's head, else L's head. With TAKEOVER clear
// (best-effort VC), every per-output queue is a single FIFO. Because U is only used
// while L is non-empty, an empty L means an empty pair.
//
// All 2*NP lists live in one NSLOT-entry header memory with per-slot next pointers,
// so the whole VC may be taken by one output; free slots are tracked by a bitmap and
// the lowest free slot is allocated. Interface: push/push_hdr (one per cycle, the
// caller guarantees space), head_valid/head_hdr per output (combinational), pop with
// pop_port (one per cycle). A packet pushed in one cycle is visible from the next.
// Status: cnt (packets held), push_u (this push went to a take-over queue), pop_u
// (this pop took a take-over head).
//
// Per-output queues at the switch inputs and the queue-pair rules follow the
// document; the shared linked-list memory, tie rule (L wins equal deadlines) and
// one push plus one pop per cycle are this design's choices.
module voq_vc
  import edf_pkg::*;
#(
  parameter int unsigned NP       = 16,
  parameter int unsigned NSLOT    = VC_UNITS,
  parameter bit          TAKEOVER = 1'b1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  hdr_t                       push_hdr,
  output logic [NP-1:0]              head_valid,
  output hdr_t [NP-1:0]              head_hdr,
  input  logic                       pop,
  input  logic [$clog2(NP)-1:0]      pop_port,
  output logic [$clog2(NSLOT+1)-1:0] cnt,
  output logic                       push_u,
  output logic                       pop_u
);
  localparam int unsigned IW = $clog2(NSLOT);
  localparam int unsigned CW = $clog2(NSLOT+1);
  localparam int unsigned PW = $clog2(NP);

  hdr_t          mem [NSLOT];
  logic [IW-1:0] nxt [NSLOT];
  logic [NSLOT-1:0] free_map;

  logic [IW-1:0] head_l [NP];
  logic [IW-1:0] tail_l [NP];
  logic [IW-1:0] head_u [NP];
  logic [IW-1:0] tail_u [NP];
  logic [CW-1:0] cnt_l  [NP];
  logic [CW-1:0] cnt_u  [NP];
  time_t         tail_dl_l [NP];
  logic [CW-1:0] total;

  logic [NP-1:0] take_u;
  logic [PW-1:0] q;
  logic          pop_l;
  logic          l_empty_after, u_empty_after, to_l;
  logic [IW-1:0] alloc;

  always_comb begin
    for (int o = 0; o < NP; o++) begin
      take_u[o] = TAKEOVER && (cnt_u[o] != '0)
                  && ((cnt_l[o] == '0) || dl_before(mem[head_u[o]].dl, mem[head_l[o]].dl));
      head_valid[o] = (cnt_l[o] != '0) || (cnt_u[o] != '0);
      head_hdr[o]   = take_u[o] ? mem[head_u[o]] : mem[head_l[o]];
    end
  end

  assign pop_u = pop && take_u[pop_port];
  assign pop_l = pop && !take_u[pop_port];

  // Placement of the arriving packet, as if a pop of the same cycle happened first.
  assign q = PW'(hdr_port(push_hdr));
  assign l_empty_after = (cnt_l[q] == '0) || (cnt_l[q] == CW'(1) && pop_l && pop_port == q);
  assign u_empty_after = (cnt_u[q] == '0) || (cnt_u[q] == CW'(1) && pop_u && pop_port == q);
  assign to_l   = !TAKEOVER || l_empty_after || !dl_before(push_hdr.dl, tail_dl_l[q]);
  assign push_u = push && !to_l;

  always_comb begin
    alloc = '0;
    for (int i = NSLOT - 1; i >= 0; i--)
      if (free_map[i]) alloc = IW'(i);
  end

  assign cnt = total;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      free_map <= '1;
      total    <= '0;
      for (int o = 0; o < NP; o++) begin
        head_l[o] <= '0; tail_l[o] <= '0; head_u[o] <= '0; tail_u[o] <= '0;
        cnt_l[o]  <= '0; cnt_u[o]  <= '0; tail_dl_l[o] <= '0;
      end
    end else begin
      if (pop_l) begin
        head_l[pop_port] <= nxt[head_l[pop_port]];
        free_map[head_l[pop_port]] <= 1'b1;
        cnt_l[pop_port]  <= cnt_l[pop_port] - CW'(1);
      end
      if (pop_u) begin
        head_u[pop_port] <= nxt[head_u[pop_port]];
        free_map[head_u[pop_port]] <= 1'b1;
        cnt_u[pop_port]  <= cnt_u[pop_port] - CW'(1);
      end
      if (push) begin
        free_map[alloc] <= 1'b0;
        if (to_l) begin
          if (l_empty_after) head_l[q] <= alloc;
          tail_l[q]    <= alloc;
          tail_dl_l[q] <= push_hdr.dl;
          cnt_l[q]     <= cnt_l[q] + CW'(1) - CW'(pop_l && pop_port == q);
        end else begin
          if (u_empty_after) head_u[q] <= alloc;
          tail_u[q] <= alloc;
          cnt_u[q]  <= cnt_u[q] + CW'(1) - CW'(pop_u && pop_port == q);
        end
      end
      total <= total + CW'(push) - CW'(pop);
    end
  end

  // Header memory and next pointers: written before they are ever read, no reset.
  logic          link_we;
  logic [IW-1:0] link_at;
  assign link_we = push && (to_l ? !l_empty_after : !u_empty_after);
  assign link_at = to_l ? tail_l[q] : tail_u[q];

  always_ff @(posedge clk) begin
    if (push)    mem[alloc]   <= push_hdr;
    if (link_we) nxt[link_at] <= alloc;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  push |-> (free_map != '0));
  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                   pop |-> head_valid[pop_port]);
  a_port_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 push |-> (int'(hdr_port(push_hdr)) < NP));
endmodule
