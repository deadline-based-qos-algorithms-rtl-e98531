// host_interface_tb: self-checking test of one end-host interface, with the test
// playing the first switch.
//
// Transmit side: a control flow at the link rate (VC 0), a video flow in frame mode
// with eligible times (VC 0) and a best-effort flow (VC 1) send messages. The test
// receives every packet on the link and checks the CRC, the untouched hop pointer,
// per-flow order, that the control flow's deadline (rebuilt as TTD + the host clock
// when the packet left) equals max(previous deadline, time of the message) + len/8,
// that no video packet leaves before its eligible time (deadline - 2500 cycles), that
// packets are spaced by their link time (ceil(len/8) cycles) and that no more
// credits are used than the 64 units granted, which come back after a random delay
// (long enough at times to stall the host). Receive side: packets sent to the host
// must come out one cycle later with deadline = TTD + host clock, and their units
// must come back on credit_out.
module host_interface_tb;
  import edf_pkg::*;
  import crc8_ref::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0;
  logic [3:0] cfg_flow = '0;
  flow_cfg_t cfg_data = '0;
  logic msg_valid = 1'b0, msg_ready;
  logic [3:0] msg_flow = '0;
  logic [19:0] msg_bytes = '0;
  link_t link_out, link_in = '0;
  credit_t credit_in = '0, credit_out;
  logic rx_valid;
  hdr_t rx_hdr;
  time_t t_local;
  logic ev_divide, ev_elig_wait, ev_stall_credit, ev_vc1_held, ev_crc_err;

  host_interface #(.CLK_INIT(32'hFFFF_8000)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_tx [3] = '{0, 0, 0};
  int c_div = 0, c_wait = 0, c_stall = 0, c_held = 0, n_rx = 0;

  initial begin
    repeat (2000000) @(posedge clk);
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

  always @(posedge clk) begin
    c_div   += int'(ev_divide);
    c_wait  += int'(ev_elig_wait);
    c_stall += int'(ev_stall_credit);
    c_held  += int'(ev_vc1_held);
  end

  // control-flow deadline model
  time_t ctl_msg_time [$];
  int    ctl_msg_bytes [$];
  time_t ctl_last;
  logic  ctl_fresh = 1'b1;
  int    ctl_left = 0;
  time_t ctl_tmsg;

  task automatic configure(input int f, input flow_cfg_t c);
    @(negedge clk);
    cfg_we = 1'b1; cfg_flow = 4'(f); cfg_data = c;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic send(input int f, input int bytes);
    @(negedge clk);
    msg_valid = 1'b1; msg_flow = 4'(f); msg_bytes = 20'(bytes);
    @(posedge clk);
    while (!msg_ready) @(posedge clk);
    if (f == 0) begin ctl_msg_time.push_back(t_local); ctl_msg_bytes.push_back(bytes); end
    @(negedge clk);
    msg_valid = 1'b0;
  endtask

  // the switch side: receive, check, return credits later
  int credits_out_units = 0;
  int pend_u [2][$];
  int pend_t [2][$];
  int cyc = 0;
  int last_tx_cyc = -100, last_len = 0;
  int next_seq [3] = '{0, 0, 0};

  always @(negedge clk) begin
    cyc++;
    credit_in <= '0;
    if (rst_n) begin
      for (int v = 0; v < 2; v++)
        if (pend_t[v].size() != 0 && pend_t[v][0] <= cyc) begin
          void'(pend_t[v].pop_front());
          credit_in.units[v] <= UNITW'(pend_u[v].pop_front());
        end
      if (link_out.valid) begin
        hdr_t h;
        time_t d;
        int f, u;
        h = link_out.hdr;
        f = int'(h.flow);
        d = h.dl + t_local - 1;      // deadline in host time (clock when it left link_tx)
        check(h.crc == ref_crc(h), "tx crc");
        check(h.hop == 0, "host leaves hop pointer");
        check(f < 3 && int'(h.seq) == next_seq[f], "flow order");
        next_seq[f] = int'(h.seq) + 1;
        check(cyc - last_tx_cyc >= (last_len + 7) / 8, "link serialisation");
        last_tx_cyc = cyc; last_len = int'(h.len);
        if (f == 0) begin
          time_t base;
          if (ctl_left == 0) begin
            ctl_tmsg = ctl_msg_time.pop_front();
            ctl_left = ctl_msg_bytes.pop_front();
          end
          base = (ctl_fresh || int'(signed'(ctl_last - ctl_tmsg)) < 0) ? ctl_tmsg : ctl_last;
          check(d == base + time_t'((int'(h.len) + 7) / 8), "control deadline");
          ctl_last = d; ctl_fresh = 1'b0;
          ctl_left -= int'(h.len);
        end
        if (f == 1) check(int'(signed'(t_local - 1 - (d - 2500))) >= 0, "video sent after eligible time");
        n_tx[f]++;
        u = (int'(h.len) + 127) / 128;
        credits_out_units += u;
        check(credits_out_units <= 64, "credit limit");
        pend_u[h.vc].push_back(u);
        pend_t[h.vc].push_back(cyc + ((cyc / 3000) % 4 == 3 ? $urandom_range(200, 800) : $urandom_range(1, 20)));
      end
    end
  end
  always @(negedge clk) begin
    #1;
    credits_out_units -= int'(credit_in.units[0]) + int'(credit_in.units[1]);
  end

  // receive side
  initial begin
    hdr_t h;
    time_t exp_dl;
    int u;
    wait (rst_n);
    repeat (50) @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      h = '0;
      h.vc  = i[0];
      h.len = LENW'($urandom_range(1, 2048));
      h.dl  = time_t'($urandom_range(0, 100000)) - 32'd500;   // TTD, late packets included
      h.flow = 8'h80; h.seq = SEQW'(i); h.hop = 3'd1;
      h.crc = ref_crc(h);
      link_in.valid = 1'b1; link_in.hdr = h;
      exp_dl = h.dl + t_local;
      @(negedge clk);
      link_in.valid = 1'b0;
      check(rx_valid && rx_hdr.seq == SEQW'(i) && rx_hdr.dl == exp_dl, "received header");
      u = (int'(h.len) + 127) / 128;
      check(int'(credit_out.units[h.vc]) == u && int'(credit_out.units[!h.vc]) == 0, "rx credits");
      n_rx++;
      repeat ($urandom_range(0, 30)) @(negedge clk);
    end
  end

  initial begin
    flow_cfg_t c;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    c = '0; c.vc = 1'b0; c.mode = MODE_RATE; c.cpb = 32'h0000_2000; c.route = 32'h1;
    configure(0, c);
    c = '0; c.vc = 1'b0; c.mode = MODE_FRAME; c.use_elig = 1'b1; c.frame_lat = 24'd5000; c.route = 32'h2;
    configure(1, c);
    c = '0; c.vc = 1'b1; c.mode = MODE_RATE; c.cpb = 32'h0001_0000; c.route = 32'h3;
    configure(2, c);
    for (int i = 0; i < 120; i++) begin
      int f;
      f = $urandom_range(0, 2);
      send(f, (f == 1) ? $urandom_range(1024, 12000) : $urandom_range(128, 6000));
      repeat ($urandom_range(0, 200)) @(negedge clk);
    end
    // drain
    while (ctl_msg_time.size() != 0 || ctl_left != 0 || dut.u_inj.u_elig_q.cnt != 0
           || dut.u_inj.head_valid != 0 || dut.u_stamp.state != 0 || n_rx < 200)
      @(negedge clk);
    repeat (1000) @(negedge clk);
    check(n_tx[0] > 0 && n_tx[1] > 0 && n_tx[2] > 0, "all flows sent");
    check(c_div > 0 && c_wait > 0 && c_stall > 0 && c_held > 0, "mechanisms seen");
    $display("tx control=%0d video=%0d best-effort=%0d rx=%0d divisions=%0d elig-wait=%0d stalls=%0d vc1-held=%0d",
             n_tx[0], n_tx[1], n_tx[2], n_rx, c_div, c_wait, c_stall, c_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
