// host_injection_tb: self-checking test of the host's injection queues.
//
// Regulated packets (eligible time ahead of or behind the host clock) and best-effort
// packets are pushed at random while a reader pops either VC. A cycle-level reference
// model keeps the eligible-time list, the regulated deadline list and the best-effort
// deadline list, moves one packet per cycle from the first to the second once its
// eligible time has come, and predicts both heads, pkt_ready and the eligible-wait
// flag. It also checks that no regulated packet is offered before its eligible time.
module host_injection_tb;
  import edf_pkg::*;
  localparam int unsigned DEPTH = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  time_t t_local = 32'hFFFF_FE00;
  logic pkt_valid = 1'b0, pkt_ready;
  host_pkt_t pkt = '0;
  logic [1:0] head_valid;
  hdr_t [1:0] head_hdr;
  logic [1:0] pop = '0;
  logic ev_elig_wait;

  int checks = 0, failures = 0, n_wait = 0, n_reg = 0, n_be = 0;

  host_injection #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
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

  host_pkt_t el[$], dq[$], bq[$];
  time_t elig_of [int];

  function automatic logic earlier(time_t a, time_t b);
    return int'(signed'(a - b)) < 0;
  endfunction

  task automatic ins(inout host_pkt_t q[$], input host_pkt_t p, input logic by_elig);
    int pos;
    pos = q.size();
    for (int i = q.size() - 1; i >= 0; i--)
      if (earlier(by_elig ? p.elig : p.hdr.dl, by_elig ? q[i].elig : q[i].hdr.dl)) pos = i;
    q.insert(pos, p);
  endtask

  initial begin
    host_pkt_t p, mv;
    logic move, acc;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      t_local = t_local + 1;
      p = '0;
      p.hdr.vc  = ($urandom_range(0, 99) < 40);
      p.hdr.dl  = t_local + time_t'($urandom_range(0, 400));
      p.elig    = t_local + time_t'($urandom_range(0, 60)) - time_t'(20);
      p.hdr.seq = SEQW'(cyc);
      pkt_valid = ($urandom_range(0, 99) < 30);
      pkt       = p;
      for (int v = 0; v < 2; v++) pop[v] = head_valid[v] && ($urandom_range(0, 99) < 25);
      #1;
      // predictions
      check(head_valid[0] == (dq.size() != 0), "vc0 valid");
      check(head_valid[1] == (bq.size() != 0), "vc1 valid");
      if (dq.size() != 0) begin
        check(head_hdr[0] == dq[0].hdr, "vc0 head");
        check(!earlier(t_local, elig_of[int'(dq[0].hdr.seq)]), "offered only when eligible");
      end
      if (bq.size() != 0) check(head_hdr[1] == bq[0].hdr, "vc1 head");
      move = el.size() != 0 && !earlier(t_local, el[0].elig) && (dq.size() < DEPTH || pop[0]);
      check(pkt_ready == (p.hdr.vc ? (bq.size() < DEPTH || pop[1]) : (el.size() < DEPTH || move)), "pkt_ready");
      check(ev_elig_wait == (el.size() != 0 && earlier(t_local, el[0].elig)), "elig wait");
      if (ev_elig_wait) n_wait++;
      acc  = pkt_valid && pkt_ready;
      @(posedge clk);
      if (pop[0]) begin void'(dq.pop_front()); n_reg++; end
      if (pop[1]) begin void'(bq.pop_front()); n_be++; end
      if (move) begin mv = el.pop_front(); ins(dq, mv, 1'b0); end
      if (acc) begin
        elig_of[int'(p.hdr.seq)] = p.elig;
        if (p.hdr.vc) ins(bq, p, 1'b0);
        else ins(el, p, 1'b1);
      end
    end
    check(n_wait > 0 && n_reg > 0 && n_be > 0, "cases seen");
    $display("regulated=%0d best-effort=%0d eligible waits=%0d", n_reg, n_be, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
