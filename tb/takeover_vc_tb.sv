// takeover_vc_tb: self-checking test of the ordered / take-over queue pair.
//
// Several flows with increasing deadlines but different time offsets are pushed and
// popped at random, so deadlines arrive out of order across flows. A reference model
// written with two SystemVerilog queues applies the enqueue rule (ordered queue when
// both queues are empty or the deadline is not below the ordered queue's tail) and
// the dequeue rule (take-over head only when strictly earlier) and predicts every head
// offered. The test also checks that each flow leaves in sequence order, that the
// slot memory is reused after wrap-around (small NSLOT) and that both the take-over
// enqueue and an overtaking dequeue occur.
module takeover_vc_tb;
  import edf_pkg::*;
  localparam int unsigned NSLOT = 8;
  localparam int unsigned NFL   = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push = 1'b0, pop = 1'b0;
  hdr_t push_hdr = '0;
  logic head_valid, push_u, pop_u;
  hdr_t head_hdr;
  logic [$clog2(NSLOT+1)-1:0] cnt;

  int checks = 0, failures = 0;
  int n_push_u = 0, n_pop_u = 0;

  takeover_vc #(.NSLOT(NSLOT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  hdr_t  mq_l[$], mq_u[$];
  time_t last_dl [NFL];
  logic [SEQW-1:0] next_seq [NFL], exp_seq [NFL];

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  function automatic logic model_take_u();
    if (mq_u.size() == 0) return 1'b0;
    if (mq_l.size() == 0) return 1'b1;
    return dl_before(mq_u[0].dl, mq_l[0].dl);
  endfunction

  initial begin
    int f;
    hdr_t h, exp_h;
    logic tu;
    for (int i = 0; i < NFL; i++) begin
      last_dl[i]  = time_t'(32'hFFFF_FF00 + i * 40);   // near wrap-around on purpose
      next_seq[i] = '0;
      exp_seq[i]  = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // stimulus
      push = 1'b0;
      pop  = 1'b0;
      if ((mq_l.size() + mq_u.size()) < NSLOT && ($urandom_range(0, 99) < 50)) begin
        f = $urandom_range(0, NFL - 1);
        h = '0;
        last_dl[f] = last_dl[f] + time_t'($urandom_range(1, 60));
        h.dl   = last_dl[f];
        h.flow = FLOWW'(f);
        h.seq  = next_seq[f];
        h.len  = LENW'($urandom_range(1, 2048));
        next_seq[f]++;
        push     = 1'b1;
        push_hdr = h;
      end
      if (head_valid && ($urandom_range(0, 99) < 45)) pop = 1'b1;
      // expected head
      check(head_valid == (mq_l.size() + mq_u.size() != 0), "head_valid");
      check(cnt == ($bits(cnt))'(mq_l.size() + mq_u.size()), "cnt");
      tu = model_take_u();
      if (head_valid) begin
        exp_h = tu ? mq_u[0] : mq_l[0];
        check(head_hdr == exp_h, "head_hdr");
      end
      #1;
      if (pop) check(pop_u == tu, "pop_u");
      @(posedge clk);
      // model update: pop, then push
      if (pop) begin
        if (tu) begin h = mq_u.pop_front(); n_pop_u++; end
        else    h = mq_l.pop_front();
        check(h.seq == exp_seq[h.flow], "per-flow order");
        exp_seq[h.flow] = h.seq + 1'b1;
      end
      if (push) begin
        if ((mq_l.size() == 0 && mq_u.size() == 0) || !dl_before(push_hdr.dl, mq_l[$].dl)) begin
          mq_l.push_back(push_hdr);
        end else begin
          mq_u.push_back(push_hdr);
          n_push_u++;
        end
      end
    end
    check(n_push_u > 0, "take-over enqueue happened");
    check(n_pop_u > 0, "overtaking dequeue happened");
    $display("take-over enqueues=%0d overtaking dequeues=%0d", n_push_u, n_pop_u);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
