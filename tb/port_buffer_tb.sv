// port_buffer_tb: self-checking test of a two-VC port buffer.
//
// Random packets of both VCs arrive while a reader pops one VC at a time. A reference
// model keeps VC 0 as an ordered and a take-over queue (same enqueue and dequeue rules
// as the document's buffer) and VC 1 as one FIFO, and predicts both heads, the free
// buffer units of each VC (8 Kbytes counted in 128-byte units), the units released
// by each pop and the take-over events. Arrivals respect the free space, as the
// credit protocol guarantees in the network.
module port_buffer_tb;
  import edf_pkg::*;
  localparam int unsigned NSLOT = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  hdr_t in_hdr = '0;
  logic [1:0] head_valid;
  hdr_t [1:0] head_hdr;
  logic [1:0] pop = '0;
  logic [1:0][UNITW-1:0] free_units;
  credit_t popped_units;
  logic to_takeover, from_takeover;

  int checks = 0, failures = 0, n_to = 0, n_from = 0, n_vc1 = 0;

  port_buffer #(.NSLOT(NSLOT)) dut (.*);
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

  hdr_t ql[$], qu[$], q1[$];
  int   used [2];
  time_t last [4];

  function automatic int units(hdr_t h);
    int u;
    u = (int'(h.len) + 127) / 128;
    return (u == 0) ? 1 : u;
  endfunction

  function automatic logic take_u();
    if (qu.size() == 0) return 1'b0;
    if (ql.size() == 0) return 1'b1;
    return dl_before(qu[0].dl, ql[0].dl);
  endfunction

  initial begin
    hdr_t h, e;
    int f, v;
    logic tu;
    for (int i = 0; i < 4; i++) last[i] = time_t'(i * 100);
    used[0] = 0; used[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 10000; cyc++) begin
      @(negedge clk);
      in_valid = 1'b0;
      pop = '0;
      h = '0;
      f = $urandom_range(0, 3);
      last[f] = last[f] + time_t'($urandom_range(1, 300));
      h.vc   = f[0];
      h.dl   = last[f];
      h.flow = FLOWW'(f);
      h.len  = LENW'($urandom_range(1, 700));
      if ($urandom_range(0, 99) < 55 && used[h.vc] + units(h) <= NSLOT) begin
        in_valid = 1'b1;
        in_hdr   = h;
      end
      v = $urandom_range(0, 1);
      if (head_valid[v] && $urandom_range(0, 99) < 50) pop[v] = 1'b1;
      // predictions
      tu = take_u();
      check(head_valid[0] == (ql.size() + qu.size() != 0), "vc0 valid");
      check(head_valid[1] == (q1.size() != 0), "vc1 valid");
      if (head_valid[0]) check(head_hdr[0] == (tu ? qu[0] : ql[0]), "vc0 head");
      if (head_valid[1]) check(head_hdr[1] == q1[0], "vc1 head");
      check(int'(free_units[0]) == NSLOT - used[0], "vc0 free units");
      check(int'(free_units[1]) == NSLOT - used[1], "vc1 free units");
      #1;
      for (int k = 0; k < 2; k++)
        check(int'(popped_units.units[k]) == (pop[k] ? units(head_hdr[k]) : 0), "popped units");
      begin
        logic exp_to;
        if (ql.size() == 0 || (ql.size() == 1 && qu.size() == 0 && pop[0])) exp_to = 1'b0;
        else exp_to = dl_before(in_hdr.dl, ql[$].dl);
        check(to_takeover == (in_valid && !in_hdr.vc && exp_to), "to_takeover");
        check(from_takeover == (pop[0] && tu), "from_takeover");
      end
      @(posedge clk);
      if (pop[0]) begin
        if (tu) begin e = qu.pop_front(); n_from++; end
        else e = ql.pop_front();
        used[0] -= units(e);
      end
      if (pop[1]) begin e = q1.pop_front(); used[1] -= units(e); end
      if (in_valid) begin
        used[in_hdr.vc] += units(in_hdr);
        if (in_hdr.vc) begin q1.push_back(in_hdr); n_vc1++; end
        else if ((ql.size() == 0 && qu.size() == 0) || !dl_before(in_hdr.dl, ql[$].dl)) begin
          ql.push_back(in_hdr);
        end else begin
          qu.push_back(in_hdr);
          n_to++;
        end
      end
    end
    check(n_to > 0 && n_from > 0 && n_vc1 > 0, "all paths used");
    $display("to take-over=%0d from take-over=%0d vc1=%0d", n_to, n_from, n_vc1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
