// sorted_queue_tb: self-checking test of the host's sorted queue, in both key modes.
//
// Two queues (sorted by eligible time and by deadline) receive the same random
// packets, keys spread around the 32-bit wrap point and with deliberate ties, and are
// popped at random. A reference list sorted by a stable insertion predicts each head;
// equal keys must leave in arrival order. Pushes stop when a queue is full, so both
// the full and the simultaneous push-and-pop cases occur.
module sorted_queue_tb;
  import edf_pkg::*;
  localparam int unsigned DEPTH = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push = 1'b0;
  logic [1:0] pop = '0;
  host_pkt_t push_pkt = '0;
  logic [1:0] push_ready, head_valid;
  host_pkt_t [1:0] head_pkt;
  logic [1:0][$clog2(DEPTH+1)-1:0] cnt;

  int checks = 0, failures = 0, n_full = 0, n_both = 0;

  sorted_queue #(.DEPTH(DEPTH), .KEY_ELIG(1'b1)) dut_e (
    .clk, .rst_n, .push(push && push_ready[0] && push_ready[1]), .push_pkt, .push_ready(push_ready[0]),
    .head_valid(head_valid[0]), .head_pkt(head_pkt[0]), .pop(pop[0]), .cnt(cnt[0]));
  sorted_queue #(.DEPTH(DEPTH), .KEY_ELIG(1'b0)) dut_d (
    .clk, .rst_n, .push(push && push_ready[0] && push_ready[1]), .push_pkt, .push_ready(push_ready[1]),
    .head_valid(head_valid[1]), .head_pkt(head_pkt[1]), .pop(pop[1]), .cnt(cnt[1]));

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

  host_pkt_t m [2][$];

  function automatic time_t k(int q, host_pkt_t p);
    return (q == 0) ? p.elig : p.hdr.dl;
  endfunction

  initial begin
    host_pkt_t p;
    logic do_push;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      p = '0;
      p.elig   = 32'hFFFF_FFF0 + time_t'($urandom_range(0, 31));
      p.hdr.dl = 32'hFFFF_FFF0 + time_t'($urandom_range(0, 31));
      p.hdr.seq = SEQW'(cyc);
      push     = ($urandom_range(0, 99) < 50);
      push_pkt = p;
      for (int q = 0; q < 2; q++) pop[q] = head_valid[q] && ($urandom_range(0, 99) < 45);
      for (int q = 0; q < 2; q++) begin
        check(head_valid[q] == (m[q].size() != 0), "head_valid");
        check(int'(cnt[q]) == m[q].size(), "cnt");
        if (m[q].size() != 0) check(head_pkt[q] == m[q][0], "head");
      end
      #1;
      do_push = push && push_ready[0] && push_ready[1];
      if (push && !do_push) n_full++;
      if (do_push && (pop[0] || pop[1])) n_both++;
      @(posedge clk);
      for (int q = 0; q < 2; q++) begin
        int pos;
        if (pop[q]) void'(m[q].pop_front());
        if (do_push) begin
          pos = m[q].size();
          for (int i = m[q].size() - 1; i >= 0; i--)
            if (int'(signed'(k(q, p) - k(q, m[q][i]))) < 0) pos = i;
          m[q].insert(pos, p);
        end
      end
    end
    check(n_full > 0 && n_both > 0, "full and push+pop cases seen");
    $display("full=%0d push+pop=%0d", n_full, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
