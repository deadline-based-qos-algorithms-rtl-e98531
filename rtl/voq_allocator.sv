// voq_allocator: crossbar arbitration for input buffers with virtual output queues.
// Each cycle it connects inputs to outputs, at most one packet per input and per
// output, in one request-grant-accept round.
//
// Every input offers, for each output and VC, the head of the matching per-output
// queue. A head is a candidate when the output buffer has room for it in its VC.
// Grant: each output picks among its candidates a VC 0 packet before a VC 1 packet,
// then the earliest deadline, then the lowest input number. Accept: an input granted
// by several outputs takes the grant of a VC 0 packet before a VC 1 packet, then the
// earliest deadline, then the lowest output number; the other outputs stay idle for
// this cycle. So regulated traffic keeps absolute priority and deadlines decide
// within a VC, at every contention point, looking only at queue heads.
//
// Interface (all combinational): head_valid/head_hdr per input, output and VC;
// out_free per output and VC; in_pop (per input and VC) and in_port (the output whose
// queue is popped); out_push/out_hdr per output. Status: lost, per input, set when it
// had a candidate but moved nothing.
//
// EDF over queue heads with regulated priority follows the document; the single
// request-grant-accept round and the tie rules are this design's choices.
module voq_allocator
  import edf_pkg::*;
#(
  parameter int unsigned NP = 16
) (
  input  logic [NP-1:0][NP-1:0][1:0]   head_valid,   // [input][output][vc]
  input  hdr_t [NP-1:0][NP-1:0][1:0]   head_hdr,
  input  logic [NP-1:0][1:0][UNITW-1:0] out_free,
  output logic [NP-1:0][1:0]           in_pop,
  output logic [NP-1:0][$clog2(NP)-1:0] in_port,
  output logic [NP-1:0]                out_push,
  output hdr_t [NP-1:0]                out_hdr,
  output logic [NP-1:0]                lost
);
  localparam int unsigned IW = $clog2(NP);

  logic [NP-1:0]         cand_any;     // per input
  logic [NP-1:0]         g_valid;      // per output
  logic [NP-1:0][IW-1:0] g_in;
  logic [NP-1:0]         g_vc;
  hdr_t [NP-1:0]         g_hdr;
  logic [NP-1:0]         a_valid;      // per input
  logic [NP-1:0][IW-1:0] a_out;

  // a beats b: VC 0 first, then earliest deadline (equal keeps b, the lower index).
  function automatic logic better(logic va, hdr_t ha, logic vb, hdr_t hb);
    return (va < vb) || (va == vb && dl_before(ha.dl, hb.dl));
  endfunction

  // Grant.
  always_comb begin
    cand_any = '0;
    for (int o = 0; o < NP; o++) begin
      g_valid[o] = 1'b0;
      g_in[o]    = '0;
      g_vc[o]    = 1'b0;
      g_hdr[o]   = head_hdr[0][o][0];
      for (int i = 0; i < NP; i++)
        for (int v = 0; v < 2; v++)
          if (head_valid[i][o][v] && pkt_units(head_hdr[i][o][v].len) <= out_free[o][v]) begin
            cand_any[i] = 1'b1;
            if (!g_valid[o] || better(1'(v), head_hdr[i][o][v], g_vc[o], g_hdr[o])) begin
              g_valid[o] = 1'b1;
              g_in[o]    = IW'(i);
              g_vc[o]    = 1'(v);
              g_hdr[o]   = head_hdr[i][o][v];
            end
          end
    end
  end

  // Accept.
  always_comb begin
    for (int i = 0; i < NP; i++) begin
      a_valid[i] = 1'b0;
      a_out[i]   = '0;
      for (int o = 0; o < NP; o++)
        if (g_valid[o] && g_in[o] == IW'(i)
            && (!a_valid[i] || better(g_vc[o], g_hdr[o], g_vc[a_out[i]], g_hdr[a_out[i]]))) begin
          a_valid[i] = 1'b1;
          a_out[i]   = IW'(o);
        end
      in_port[i]   = a_out[i];
      in_pop[i][0] = a_valid[i] && !g_vc[a_out[i]];
      in_pop[i][1] = a_valid[i] &&  g_vc[a_out[i]];
      lost[i]      = cand_any[i] && !a_valid[i];
    end
    for (int o = 0; o < NP; o++) begin
      out_push[o] = g_valid[o] && a_valid[g_in[o]] && a_out[g_in[o]] == IW'(o);
      out_hdr[o]  = g_hdr[o];
    end
  end
endmodule
