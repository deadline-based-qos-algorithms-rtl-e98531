// edf_switch_tb: self-checking test of a 4-port switch with 16-unit buffers.
//
// Four senders inject packets of several flows per port (both VCs, random lengths and
// routes, per-flow increasing deadlines with different offsets, so deadlines reach
// the switch out of order across flows). Senders put a time-to-deadline and a
// reference CRC in each header and respect the switch's credits, which they get back
// on credit_out. Four receivers return credits after a random delay. The test checks
// that every packet leaves exactly once on the port its route names, with the hop
// pointer advanced, a correct CRC and TTD_out = TTD_in - (cycles spent in the switch),
// that each flow leaves in order, that the unloaded latency is 4 cycles, that one
// corrupted header is dropped and its credits returned, and that take-over queueing,
// overtaking, credit stalls and crossbar conflicts all occur.
module edf_switch_tb;
  import edf_pkg::*;
  import crc8_ref::*;
  localparam int unsigned NP = 4;
  localparam int unsigned NSLOT = 16;
  localparam int unsigned NPKT = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  link_t   [NP-1:0] link_in = '0;
  credit_t [NP-1:0] credit_out;
  link_t   [NP-1:0] link_out;
  credit_t [NP-1:0] credit_in = '0;
  logic [NP-1:0] ev_in_takeover, ev_out_takeover, ev_overtake, ev_crc_err,
                 ev_stall_credit, ev_vc1_held, ev_xbar_lost;

  edf_switch #(.NP(NP), .NSLOT(NSLOT), .CLK_INIT(32'h7FFF_FFF0)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_sent = 0, n_recv = 0;
  int c_in_to = 0, c_out_to = 0, c_over = 0, c_crc = 0, c_stall = 0, c_held = 0, c_lost = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: injected packets outstanding=%0d received=%0d", sent_hdr.size(), n_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  function automatic int units(hdr_t h);
    int u;
    u = (int'(h.len) + 127) / 128;
    return (u == 0) ? 1 : u;
  endfunction

  // bookkeeping, indexed by flow * 65536 + seq
  int    sent_cyc [int];
  hdr_t  sent_hdr [int];
  int    next_rx_seq [int];
  int    cred [NP][2];
  int    pend_cred [NP][2][$];   // receiver side: units waiting to be returned
  int    pend_when [NP][2][$];

  always @(posedge clk) begin
    c_in_to  += $countones(ev_in_takeover);
    c_out_to += $countones(ev_out_takeover);
    c_over   += $countones(ev_overtake);
    c_crc    += $countones(ev_crc_err);
    c_stall  += $countones(ev_stall_credit);
    c_held   += $countones(ev_vc1_held);
    c_lost   += $countones(ev_xbar_lost);
  end

  initial begin
    time_t fdl [NP][8];
    int    fseq [NP][8];
    int    injected, bad_sent;
    for (int p = 0; p < NP; p++) begin
      cred[p][0] = NSLOT; cred[p][1] = NSLOT;
      for (int f = 0; f < 8; f++) begin fdl[p][f] = time_t'(f * 400); fseq[p][f] = 0; end
    end
    injected = 0; bad_sent = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (n_recv < NPKT + 1 || injected < NPKT) begin
      @(negedge clk);
      cyc++;
      // credits coming back from the switch input buffers
      for (int p = 0; p < NP; p++)
        for (int v = 0; v < 2; v++) cred[p][v] += int'(credit_out[p].units[v]);
      // receivers: check departures, schedule credit returns
      for (int p = 0; p < NP; p++) begin
        if (link_out[p].valid) begin
          hdr_t h, s;
          int key, resid;
          h = link_out[p].hdr;
          key = int'(h.flow) * 65536 + int'(h.seq);
          check(sent_hdr.exists(key), "known packet");
          if (sent_hdr.exists(key)) begin
            s = sent_hdr[key];
            resid = cyc - sent_cyc[key] - 1;
            check(int'(s.route[s.hop]) == p, "leaves on routed port");
            check(h.hop == s.hop + 1'b1, "hop advanced");
            check(h.crc == ref_crc(h), "crc recomputed");
            check(h.dl == s.dl - time_t'(resid), "TTD reduced by time in switch");
            check(h.len == s.len && h.vc == s.vc, "fields kept");
            if (n_recv == 0) check(resid + 1 == 4, "unloaded latency 4 cycles");
            check(!next_rx_seq.exists(int'(h.flow)) || next_rx_seq[int'(h.flow)] == int'(h.seq),
                  "flow order");
            next_rx_seq[int'(h.flow)] = int'(h.seq) + 1;
            sent_hdr.delete(key);
          end
          n_recv++;
          pend_cred[p][h.vc].push_back(units(h));
          pend_when[p][h.vc].push_back(cyc + $urandom_range(1, (p == 0) ? 150 : 40));
        end
      end
      for (int p = 0; p < NP; p++) begin
        credit_t c;
        c = '0;
        for (int v = 0; v < 2; v++)
          if (pend_when[p][v].size() != 0 && pend_when[p][v][0] <= cyc) begin
            void'(pend_when[p][v].pop_front());
            c.units[v] = UNITW'(pend_cred[p][v].pop_front());
          end
        credit_in[p] = c;
      end
      // senders
      for (int p = 0; p < NP; p++) begin
        link_in[p] = '0;
        if (injected < NPKT && $urandom_range(0, 99) < 45) begin
          hdr_t h;
          int f;
          f = $urandom_range(0, 7);
          h = '0;
          h.vc   = (f >= 6);
          h.len  = LENW'($urandom_range(1, 700));
          h.hop  = HOPW'($urandom_range(0, 3));
          for (int k = 0; k < MAXHOPS; k++) h.route[k] = PORTW'($urandom_range(0, NP - 1));
          // one flow per (source, f): fixed destination port at the chosen hop
          h.route[h.hop] = PORTW'((p + f) % NP);
          fdl[p][f] = fdl[p][f] + time_t'($urandom_range(20, 300));
          h.dl   = fdl[p][f] - time_t'(cyc);     // TTD
          h.flow = FLOWW'(p * 8 + f);
          h.seq  = SEQW'(fseq[p][f]);
          h.crc  = ref_crc(h);
          if (cred[p][h.vc] >= units(h)) begin
            fseq[p][f]++;
            cred[p][h.vc] -= units(h);
            link_in[p].valid = 1'b1;
            link_in[p].hdr   = h;
            sent_hdr[int'(h.flow) * 65536 + int'(h.seq)] = h;
            sent_cyc[int'(h.flow) * 65536 + int'(h.seq)] = cyc;
            injected++;
          end
        end
      end
      // one corrupted header on port 1 halfway through: dropped, credits returned
      if (injected >= NPKT / 2 && !bad_sent && !link_in[1].valid && cred[1][0] >= 4) begin
        hdr_t h;
        h = '0; h.len = 500; h.flow = 8'hFF;
        h.crc = ref_crc(h) ^ 8'h01;
        cred[1][0] -= 4;
        link_in[1].valid = 1'b1;
        link_in[1].hdr = h;
        bad_sent = 1;
        n_recv++;       // accounted as handled
      end
    end
    repeat (60) @(negedge clk) for (int p = 0; p < NP; p++)
      for (int v = 0; v < 2; v++) cred[p][v] += int'(credit_out[p].units[v]);
    check(sent_hdr.size() == 0, "every packet delivered");
    for (int p = 0; p < NP; p++) check(cred[p][0] == NSLOT && cred[p][1] == NSLOT, "all credits back");
    check(c_crc == 1, "one CRC error");
    check(c_in_to > 0 && c_out_to > 0, "take-over queueing happened");
    check(c_over > 0, "overtaking happened");
    check(c_stall > 0, "credit stall happened");
    check(c_lost > 0, "crossbar conflict happened");
    $display("sent=%0d in-takeover=%0d out-takeover=%0d overtakes=%0d stalls=%0d vc1-held=%0d xbar-lost=%0d",
             injected, c_in_to, c_out_to, c_over, c_stall, c_held, c_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
