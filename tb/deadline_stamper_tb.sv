// deadline_stamper_tb: self-checking test of the host flow table and deadline stamping.
//
// Three flows are configured: a control flow at the link rate (1/8 cycle per byte),
// a 400 Kbyte/s flow (312.5 cycles per byte at 125 MHz) and a video flow in frame
// mode with a 10 ms (1,250,000-cycle) target latency and eligible times. Random
// messages are sent, including an 80-Kbyte frame, which must become 40 packets of
// 2 Kbytes whose deadlines are 31,250 cycles apart. For every packet the test
// recomputes length, deadline D = max(D_prev, Tnow) + increment, eligible time
// (D - 2500 cycles, or Tnow), VC, route, flow and sequence number, and it checks the
// latency from message acceptance to the first packet (1 cycle, or 25 more when a
// frame increment must be divided out).
module deadline_stamper_tb;
  import edf_pkg::*;
  localparam int unsigned NFLOWS = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  time_t t_local = 32'hFFFF_F000;
  logic cfg_we = 1'b0;
  logic [1:0] cfg_flow = '0;
  flow_cfg_t cfg_data = '0;
  logic msg_valid = 1'b0, msg_ready;
  logic [1:0] msg_flow = '0;
  logic [19:0] msg_bytes = '0;
  logic pkt_valid, pkt_ready = 1'b0;
  host_pkt_t pkt;
  logic ev_divide;

  int checks = 0, failures = 0, n_pkts = 0, n_div = 0;

  deadline_stamper #(.NFLOWS(NFLOWS), .ELIG_OFFSET(2500)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  flow_cfg_t cfgs [NFLOWS];
  longint    last [NFLOWS];
  logic      fresh [NFLOWS];
  int        seqs [NFLOWS];

  always @(negedge clk) t_local <= t_local + 1;

  task automatic configure(input int f, input flow_cfg_t c);
    @(negedge clk);
    cfg_we = 1'b1; cfg_flow = 2'(f); cfg_data = c;
    @(negedge clk);
    cfg_we = 1'b0;
    cfgs[f] = c; fresh[f] = 1'b1; seqs[f] = 0;
  endtask

  task automatic send(input int f, input int bytes);
    time_t tmsg;
    int remaining, len, parts, waited;
    longint inc, base, d;
    @(negedge clk);
    msg_valid = 1'b1; msg_flow = 2'(f); msg_bytes = 20'(bytes);
    while (!msg_ready) @(negedge clk);
    @(posedge clk);
    tmsg = t_local;          // clock value seen by the stamper when it accepts the message
    @(negedge clk);
    msg_valid = 1'b0;
    parts = (bytes + 2047) / 2048;
    remaining = bytes;
    waited = 0;
    while (remaining > 0) begin
      pkt_ready = ($urandom_range(0, 99) < 70);
      #1;
      if (!pkt_valid) begin
        waited++;
        @(negedge clk);
        continue;
      end
      if (remaining == bytes) begin
        check(waited == ((cfgs[f].mode == MODE_FRAME) ? 24 : 0), "first-packet latency");
      end
      len = (remaining > 2048) ? 2048 : remaining;
      if (cfgs[f].mode == MODE_FRAME) inc = longint'(cfgs[f].frame_lat) / parts;
      else inc = (longint'(len) * longint'(cfgs[f].cpb) + 65535) / 65536;
      if (inc == 0) inc = 1;
      base = (fresh[f] || int'(signed'(time_t'(last[f]) - tmsg)) < 0) ? longint'(tmsg) : last[f];
      d = base + inc;
      check(int'(pkt.hdr.len) == len, "length");
      check(pkt.hdr.dl == time_t'(d), "deadline");
      check(pkt.elig == (cfgs[f].use_elig ? time_t'(d - 2500) : tmsg), "eligible time");
      check(pkt.hdr.vc == cfgs[f].vc && pkt.hdr.route == cfgs[f].route && pkt.hdr.hop == 0, "header fields");
      check(int'(pkt.hdr.flow) == f && int'(pkt.hdr.seq) == seqs[f], "flow and sequence");
      if (pkt_ready) begin
        last[f] = longint'(time_t'(d));
        fresh[f] = 1'b0;
        seqs[f]++;
        remaining -= len;
        n_pkts++;
      end
      @(negedge clk);
    end
    pkt_ready = 1'b0;
  endtask

  always @(posedge clk) if (ev_divide) n_div++;

  initial begin
    flow_cfg_t c;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    c = '0; c.vc = 1'b0; c.mode = MODE_RATE; c.cpb = 32'h0000_2000; c.route = 32'h0000_0003;
    configure(0, c);
    c = '0; c.vc = 1'b1; c.mode = MODE_RATE; c.cpb = 32'd20480000; c.route = 32'h0000_0105;
    configure(1, c);
    c = '0; c.vc = 1'b0; c.mode = MODE_FRAME; c.use_elig = 1'b1; c.frame_lat = 24'd1250000;
    c.route = 32'h0000_0007;
    configure(2, c);
    // the 80-Kbyte frame of the document's example: 40 packets, 31,250 cycles apart
    send(2, 80 * 1024);
    check(seqs[2] == 40, "80-Kbyte frame gives 40 packets");
    for (int i = 0; i < 60; i++) begin
      int f;
      f = $urandom_range(0, 2);
      send(f, (f == 2) ? $urandom_range(1024, 120 * 1024) : $urandom_range(1, 6000));
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    check(n_div > 0, "frame divisions happened");
    $display("packets=%0d frame divisions=%0d", n_pkts, n_div);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
