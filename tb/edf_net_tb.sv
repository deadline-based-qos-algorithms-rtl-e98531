// edf_net_tb: end-to-end test of the whole network at its default size: 16 host
// interfaces around one 16-port switch with 8-Kbyte-per-VC buffers.
//
// Every host runs four flows, after the traffic classes the design is meant for:
// control messages at the link rate to its neighbour (regulated VC), video frames in
// frame mode with eligible times towards host 0 (regulated VC; the target frame
// latency is 12,500 cycles = 100 us here to keep the run short), best-effort traffic
// towards host 0 and background traffic to another host (both on the best-effort VC,
// at different reserved rates). Host 0's port is thus overloaded, which backs traffic
// up into the switch and the hosts. Each host clock starts at a different value.
//
// Checked: every packet arrives exactly once, at the host its route names, with a good
// CRC, each flow in order, and the number of packets per flow equals the sum of
// ceil(message bytes / 2048). Counted, and a failure if one never happens: frame
// divisions, eligible-time waits, take-over enqueues in input and output buffers,
// overtaking dequeues, credit stalls, best-effort packets held back by regulated ones
// and crossbar conflicts. The share of control packets delivered by their deadline
// is reported.
module edf_net_tb;
  import edf_pkg::*;
  localparam int unsigned NP = 16;
  localparam int unsigned NMSG = 25;     // messages per host

  logic clk = 1'b0, rst_n = 1'b0;
  logic      [NP-1:0]       cfg_we = '0;
  logic      [NP-1:0][3:0]  cfg_flow = '0;
  flow_cfg_t [NP-1:0]       cfg_data = '0;
  logic      [NP-1:0]       msg_valid = '0;
  logic      [NP-1:0]       msg_ready;
  logic      [NP-1:0][3:0]  msg_flow = '0;
  logic      [NP-1:0][19:0] msg_bytes = '0;
  logic      [NP-1:0]       rx_valid;
  hdr_t      [NP-1:0]       rx_hdr;
  time_t     [NP-1:0]       host_time;
  logic [NP-1:0] ev_divide, ev_elig_wait, ev_host_stall_credit, ev_host_vc1_held, ev_host_crc_err,
                 ev_in_takeover, ev_out_takeover, ev_overtake, ev_sw_crc_err,
                 ev_sw_stall_credit, ev_sw_vc1_held, ev_xbar_lost;

  edf_net dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint c_div = 0, c_wait = 0, c_stall = 0, c_held = 0, c_crc = 0,
          c_in_to = 0, c_out_to = 0, c_over = 0, c_lost = 0;
  int expected [int];       // flow id -> packets expected
  int received [int];
  int next_seq [int];
  int n_expected = 0, n_received = 0, ctl_total = 0, ctl_on_time = 0;
  int hosts_done = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog: expected=%0d received=%0d", n_expected, n_received);
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

  always @(posedge clk) if (rst_n) begin
    c_div    += $countones(ev_divide);
    c_wait   += $countones(ev_elig_wait);
    c_stall  += $countones(ev_host_stall_credit) + $countones(ev_sw_stall_credit);
    c_held   += $countones(ev_host_vc1_held) + $countones(ev_sw_vc1_held);
    c_crc    += $countones(ev_host_crc_err) + $countones(ev_sw_crc_err);
    c_in_to  += $countones(ev_in_takeover);
    c_out_to += $countones(ev_out_takeover);
    c_over   += $countones(ev_overtake);
    c_lost   += $countones(ev_xbar_lost);
  end

  // receivers
  always @(negedge clk) if (rst_n) begin
    for (int d = 0; d < NP; d++) if (rx_valid[d]) begin
      int f;
      f = int'(rx_hdr[d].flow);
      check(int'(rx_hdr[d].route[0]) == d, "delivered to routed host");
      check(!next_seq.exists(f) || next_seq[f] == int'(rx_hdr[d].seq), "flow order");
      next_seq[f] = int'(rx_hdr[d].seq) + 1;
      received[f] = received.exists(f) ? received[f] + 1 : 1;
      n_received++;
      if (f % 16 == 0) begin
        ctl_total++;
        // deadline (receiver's time) not earlier than the receiver's clock one cycle ago
        if (int'(signed'(rx_hdr[d].dl - (host_time[d] - 1))) >= 0) ctl_on_time++;
      end
    end
  end

  function automatic flow_cfg_t mk(input logic vc, input flow_mode_e m, input logic el,
                                   input logic [31:0] cpb, input logic [23:0] lat, input int dst);
    flow_cfg_t c;
    c = '0;
    c.vc = vc; c.mode = m; c.use_elig = el; c.cpb = cpb; c.frame_lat = lat;
    c.route[0] = PORTW'(dst);
    return c;
  endfunction

  task automatic host_traffic(input int h);
    for (int m = 0; m < NMSG; m++) begin
      int f, bytes, r;
      r = $urandom_range(0, 99);
      f = (r < 35) ? 0 : (r < 60) ? 1 : (r < 80) ? 2 : 3;
      case (f)
        0: bytes = $urandom_range(128, 2048);
        1: bytes = $urandom_range(1024, 16384);
        default: bytes = $urandom_range(128, 8192);
      endcase
      @(negedge clk);
      msg_valid[h] = 1'b1; msg_flow[h] = 4'(f); msg_bytes[h] = 20'(bytes);
      @(posedge clk);
      while (!msg_ready[h]) @(posedge clk);
      expected[h * 16 + f] = (expected.exists(h * 16 + f) ? expected[h * 16 + f] : 0) + (bytes + 2047) / 2048;
      n_expected += (bytes + 2047) / 2048;
      @(negedge clk);
      msg_valid[h] = 1'b0;
      repeat ($urandom_range(0, 600)) @(negedge clk);
    end
    hosts_done++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // flow tables: 0 control, 1 video, 2 best-effort, 3 background
    for (int f = 0; f < 4; f++) begin
      @(negedge clk);
      for (int h = 0; h < NP; h++) begin
        cfg_we[h] = 1'b1; cfg_flow[h] = 4'(f);
        case (f)
          0: cfg_data[h] = mk(1'b0, MODE_RATE, 1'b0, 32'h0000_2000, '0, (h + 1) % NP);
          1: cfg_data[h] = mk(1'b0, MODE_FRAME, 1'b1, '0, 24'd12500, 0);
          2: cfg_data[h] = mk(1'b1, MODE_RATE, 1'b0, 32'h0004_0000, '0, 0);
          default: cfg_data[h] = mk(1'b1, MODE_RATE, 1'b0, 32'h0008_0000, '0, (h + 5) % NP);
        endcase
      end
    end
    @(negedge clk);
    cfg_we = '0;
    for (int h = 0; h < NP; h++) begin
      fork
        automatic int hh = h;
        host_traffic(hh);
      join_none
    end
    wait (hosts_done == NP);
    while (n_received < n_expected) @(negedge clk);
    repeat (200) @(negedge clk);
    check(n_received == n_expected, "no extra packets");
    foreach (expected[f]) check(received.exists(f) && received[f] == expected[f], "packets per flow");
    check(c_crc == 0, "no CRC errors");
    check(c_div > 0, "frame divisions");
    check(c_wait > 0, "eligible-time waits");
    check(c_in_to > 0, "take-over enqueue in an input buffer");
    check(c_out_to > 0, "take-over enqueue in an output buffer");
    check(c_over > 0, "overtaking dequeue");
    check(c_stall > 0, "credit stall");
    check(c_held > 0, "best-effort held by regulated traffic");
    check(c_lost > 0, "crossbar conflict");
    $display("packets=%0d divisions=%0d elig-wait-cycles=%0d in-takeover=%0d out-takeover=%0d overtakes=%0d",
             n_received, c_div, c_wait, c_in_to, c_out_to, c_over);
    $display("credit-stall-cycles=%0d vc1-held=%0d xbar-conflicts=%0d control on time=%0d/%0d cycles=%0t",
             c_stall, c_held, c_lost, ctl_on_time, ctl_total, $time / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
