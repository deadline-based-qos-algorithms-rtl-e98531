// voq_vc_tb: self-checking test of the virtual-output-queue channel, in both forms:
// with ordered / take-over queue pairs (regulated VC) and with plain FIFOs
// (best-effort VC). Both instances get the same stimulus.
//
// Several flows, each bound to a random output and with increasing deadlines from
// different offsets (near clock wrap-around), are pushed, and random outputs are
// popped. A reference model keeps SystemVerilog queues per output: for the regulated
// form it applies the enqueue rule (ordered queue when it is empty or the deadline is
// not below its tail) and the dequeue rule (take-over head only when strictly
// earlier). Every head of every output, the counts and the take-over flags are
// compared each cycle; each flow must leave in sequence order. Slots are reused many
// times (small NSLOT), and both take-over enqueues and overtaking dequeues must occur.
module voq_vc_tb;
  import edf_pkg::*;
  localparam int unsigned NP    = 4;
  localparam int unsigned NSLOT = 8;
  localparam int unsigned NFL   = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push = 1'b0, pop = 1'b0;
  logic [1:0] pop_port = '0;
  hdr_t push_hdr = '0;
  logic [NP-1:0] hv_t, hv_f;
  hdr_t [NP-1:0] hh_t, hh_f;
  logic [$clog2(NSLOT+1)-1:0] cnt_t, cnt_f;
  logic pu_t, po_t, pu_f, po_f;

  voq_vc #(.NP(NP), .NSLOT(NSLOT), .TAKEOVER(1'b1)) dut_t (
    .clk, .rst_n, .push, .push_hdr, .head_valid(hv_t), .head_hdr(hh_t),
    .pop, .pop_port, .cnt(cnt_t), .push_u(pu_t), .pop_u(po_t));
  voq_vc #(.NP(NP), .NSLOT(NSLOT), .TAKEOVER(1'b0)) dut_f (
    .clk, .rst_n, .push, .push_hdr, .head_valid(hv_f), .head_hdr(hh_f),
    .pop, .pop_port, .cnt(cnt_f), .push_u(pu_f), .pop_u(po_f));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_push_u = 0, n_pop_u = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  hdr_t mq_l [NP][$];
  hdr_t mq_u [NP][$];
  hdr_t mq_f [NP][$];
  time_t last_dl [NFL];
  logic [1:0] flow_port [NFL];
  logic [SEQW-1:0] next_seq [NFL*6], exp_seq_t [NFL*6], exp_seq_f [NFL*6];

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  function automatic logic model_take_u(int o);
    if (mq_u[o].size() == 0) return 1'b0;
    if (mq_l[o].size() == 0) return 1'b1;
    return dl_before(mq_u[o][0].dl, mq_l[o][0].dl);
  endfunction

  function automatic int total();
    int s = 0;
    for (int o = 0; o < NP; o++) s += mq_l[o].size() + mq_u[o].size();
    return s;
  endfunction

  initial begin
    int f, o;
    hdr_t h;
    logic tu;
    for (int i = 0; i < NFL; i++) begin
      last_dl[i]   = time_t'(32'hFFFF_FE00 + i * 37);
      flow_port[i] = 2'($urandom_range(0, NP - 1));
    end
    for (int i = 0; i < NFL * 6; i++) begin
      next_seq[i]  = '0;
      exp_seq_t[i] = '0;
      exp_seq_f[i] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 30000; cyc++) begin
      @(negedge clk);
      push = 1'b0;
      pop  = 1'b0;
      // Every 5000 cycles the flows are replaced by new ones (new identifiers) bound
      // to other outputs: a flow keeps one route, as in the network.
      if (cyc % 5000 == 0)
        for (int i = 0; i < NFL; i++) flow_port[i] = 2'($urandom_range(0, NP - 1));
      // Pushes only when the slot memory has room after this cycle's pop.
      if (total() < NSLOT && ($urandom_range(0, 99) < 55)) begin
        f = $urandom_range(0, NFL - 1);
        h = '0;
        last_dl[f] = last_dl[f] + time_t'($urandom_range(1, 80));
        h.dl       = last_dl[f];
        h.flow     = FLOWW'(f + NFL * (cyc / 5000));
        h.seq      = next_seq[h.flow];
        h.len      = LENW'($urandom_range(1, 2048));
        h.route[0] = PORTW'(flow_port[f]);
        next_seq[h.flow]++;
        push     = 1'b1;
        push_hdr = h;
      end
      o = $urandom_range(0, NP - 1);
      if (mq_f[o].size() != 0 && ($urandom_range(0, 99) < 60)) begin
        pop      = 1'b1;
        pop_port = 2'(o);
      end
      // Expected heads, both forms.
      check(cnt_t == ($bits(cnt_t))'(total()), "cnt takeover");
      for (int p = 0; p < NP; p++) begin
        check(hv_t[p] == (mq_l[p].size() + mq_u[p].size() != 0), "head_valid takeover");
        check(hv_f[p] == (mq_f[p].size() != 0), "head_valid fifo");
        if (hv_t[p]) check(hh_t[p] == (model_take_u(p) ? mq_u[p][0] : mq_l[p][0]), "head_hdr takeover");
        if (hv_f[p]) check(hh_f[p] == mq_f[p][0], "head_hdr fifo");
      end
      tu = model_take_u(o);
      #1;
      check(pu_f == 1'b0 && po_f == 1'b0, "fifo form never uses take-over");
      if (pop) check(po_t == tu, "pop_u");
      // Model update (pop, then push) while the flags of this cycle are still stable.
      if (pop) begin
        if (tu) begin h = mq_u[o].pop_front(); n_pop_u++; end
        else    h = mq_l[o].pop_front();
        check(h.seq == exp_seq_t[h.flow], "per-flow order takeover");
        exp_seq_t[h.flow] = h.seq + 1'b1;
        h = mq_f[o].pop_front();
        check(h.seq == exp_seq_f[h.flow], "per-flow order fifo");
        exp_seq_f[h.flow] = h.seq + 1'b1;
      end
      if (push) begin
        int q;
        q = int'(push_hdr.route[0]);
        mq_f[q].push_back(push_hdr);
        if (mq_l[q].size() == 0 || !dl_before(push_hdr.dl, mq_l[q][$].dl)) begin
          check(pu_t == 1'b0, "push_u low");
          mq_l[q].push_back(push_hdr);
        end else begin
          check(pu_t == 1'b1, "push_u high");
          mq_u[q].push_back(push_hdr);
          n_push_u++;
        end
      end
      @(posedge clk);
    end
    check(n_push_u > 0, "take-over enqueue happened");
    check(n_pop_u > 0, "overtaking dequeue happened");
    $display("take-over enqueues=%0d overtaking dequeues=%0d", n_push_u, n_pop_u);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
