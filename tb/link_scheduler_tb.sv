// link_scheduler_tb: self-checking test of the output multiplexer.
//
// Random heads are offered on both VCs (held until popped) and random credit returns
// arrive. A reference model tracks per-VC credits (128-byte units) and link occupancy
// (ceil(len/8) cycles per packet, the 8 Gb/s rate at 8 bytes per cycle) and predicts
// every pop: VC 0 whenever the link is free and its head fits the credits, VC 1 only
// when VC 0 cannot send. It also checks the credit-stall and held-VC-1 events and that
// the measured gap between two packets equals the first packet's link time.
module link_scheduler_tb;
  import edf_pkg::*;
  localparam int unsigned INIT = 24;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] head_valid = '0;
  hdr_t [1:0] head_hdr = '0;
  logic [1:0] pop;
  credit_t credit_in = '0;
  logic tx_valid, stall_credit, vc1_held, busy;
  hdr_t tx_hdr;

  int checks = 0, failures = 0;
  int n_stall = 0, n_held = 0, n_sent [2] = '{0, 0};

  link_scheduler #(.INIT_CREDITS(INIT)) dut (.*);
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

  function automatic int units(hdr_t h);
    int u;
    u = (int'(h.len) + 127) / 128;
    return (u == 0) ? 1 : u;
  endfunction

  initial begin
    int cred [2];
    int outstanding [2];
    int busy_left, last_tx_cyc, last_len;
    logic [1:0] exp_pop;
    logic can [2];
    hdr_t h;
    cred = '{INIT, INIT};
    outstanding = '{0, 0};
    busy_left = 0;
    last_tx_cyc = -1;
    last_len = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      for (int v = 0; v < 2; v++) begin
        if (!head_valid[v] && $urandom_range(0, 99) < 40) begin
          h = '0;
          h.vc  = v[0];
          h.dl  = time_t'($urandom);
          h.len = LENW'($urandom_range(1, 2048));
          h.seq = SEQW'(cyc);
          head_valid[v] = 1'b1;
          head_hdr[v]   = h;
        end
      end
      // the downstream returns some outstanding credits
      credit_in = '0;
      for (int v = 0; v < 2; v++)
        if (outstanding[v] > 0 && $urandom_range(0, 99) < 20) begin
          int r;
          r = $urandom_range(1, outstanding[v] > 10 ? 10 : outstanding[v]);
          credit_in.units[v] = UNITW'(r);
        end
      #1;
      for (int v = 0; v < 2; v++)
        can[v] = head_valid[v] && (cred[v] >= units(head_hdr[v]));
      exp_pop = '0;
      if (busy_left == 0) begin
        if (can[0]) exp_pop[0] = 1'b1;
        else if (can[1]) exp_pop[1] = 1'b1;
      end
      check(pop == exp_pop, "pop");
      check(busy == (busy_left != 0), "busy");
      check(stall_credit == (head_valid[0] && !can[0]), "stall_credit");
      check(vc1_held == (can[1] && exp_pop[0]), "vc1_held");
      if (stall_credit) n_stall++;
      if (vc1_held) n_held++;
      if (tx_valid) begin
        int v;
        v = pop[1] ? 1 : 0;
        check(tx_hdr == head_hdr[v], "tx_hdr");
        if (last_tx_cyc >= 0)
          check(cyc - last_tx_cyc >= (last_len + 7) / 8, "link serialisation");
        last_tx_cyc = cyc;
        last_len = int'(tx_hdr.len);
        n_sent[v]++;
      end
      @(posedge clk);
      for (int v = 0; v < 2; v++) begin
        cred[v] += int'(credit_in.units[v]);
        outstanding[v] -= int'(credit_in.units[v]);
        if (exp_pop[v]) begin
          cred[v] -= units(head_hdr[v]);
          outstanding[v] += units(head_hdr[v]);
        end
      end
      if (busy_left > 0) busy_left--;
      if (tx_valid) busy_left = (int'(tx_hdr.len) + 7) / 8 - 1;
      #1;
      for (int v = 0; v < 2; v++) if (exp_pop[v]) head_valid[v] = 1'b0;
    end
    check(n_stall > 0 && n_held > 0 && n_sent[0] > 0 && n_sent[1] > 0, "all cases seen");
    $display("sent vc0=%0d vc1=%0d stalls=%0d vc1 held=%0d", n_sent[0], n_sent[1], n_stall, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
