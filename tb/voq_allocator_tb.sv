// voq_allocator_tb: self-checking test of the crossbar arbitration with virtual
// output queues.
//
// Random per-output queue heads (deadlines spread around clock wrap-around, random
// lengths, both VCs) and random free space in the output buffers are applied to a
// 6-port allocator. The test works out every candidate (a head that fits its
// output's free space), then every output's grant (VC 0 first, then the earliest
// deadline by signed difference, then the lowest input) and every input's accept
// (VC 0 first, then the earliest deadline, then the lowest output). It compares pops,
// popped port, pushes, forwarded headers and the lost flags, and requires that
// inputs granted by several outputs, VC 1 transfers and idle granted outputs occur.
module voq_allocator_tb;
  import edf_pkg::*;
  localparam int unsigned NP = 6;

  logic [NP-1:0][NP-1:0][1:0]    head_valid;
  hdr_t [NP-1:0][NP-1:0][1:0]    head_hdr;
  logic [NP-1:0][1:0][UNITW-1:0] out_free;
  logic [NP-1:0][1:0]            in_pop;
  logic [NP-1:0][2:0]            in_port;
  logic [NP-1:0]                 out_push;
  hdr_t [NP-1:0]                 out_hdr;
  logic [NP-1:0]                 lost;

  int checks = 0, failures = 0, n_vc1 = 0, n_multi = 0, n_idle = 0;

  voq_allocator #(.NP(NP)) dut (.*);

  initial begin
    #10000000;
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

  // Priority key: smaller wins. VC dominates; the deadline is taken relative to a
  // point far below every deadline used, so plain integer order is deadline order.
  function automatic longint key(int v, hdr_t h);
    logic [31:0] rel;
    rel = h.dl - 32'hFFFF_0000;
    return longint'(v) * 64'h1_0000_0000 + longint'(rel);
  endfunction

  initial begin
    int gin [NP], gvc [NP];
    int aout [NP], ngr [NP];
    logic cand [NP];
    for (int t = 0; t < 20000; t++) begin
      for (int i = 0; i < NP; i++)
        for (int o = 0; o < NP; o++)
          for (int v = 0; v < 2; v++) begin
            hdr_t h;
            h = hdr_t'({$urandom, $urandom, $urandom, $urandom});
            h.vc  = v[0];
            h.dl  = 32'hFFFF_FF80 + time_t'($urandom_range(0, 255));
            h.len = LENW'($urandom_range(1, 2048));
            head_hdr[i][o][v]   = h;
            head_valid[i][o][v] = ($urandom_range(0, 99) < 35);
          end
      for (int o = 0; o < NP; o++)
        for (int v = 0; v < 2; v++) out_free[o][v] = UNITW'($urandom_range(0, 20));
      #1;
      // grants
      for (int i = 0; i < NP; i++) begin cand[i] = 1'b0; ngr[i] = 0; aout[i] = -1; end
      for (int o = 0; o < NP; o++) begin
        gin[o] = -1; gvc[o] = 0;
        for (int i = 0; i < NP; i++)
          for (int v = 0; v < 2; v++)
            if (head_valid[i][o][v] && units(head_hdr[i][o][v]) <= int'(out_free[o][v])) begin
              cand[i] = 1'b1;
              if (gin[o] < 0 || key(v, head_hdr[i][o][v]) < key(gvc[o], head_hdr[gin[o]][o][gvc[o]])) begin
                gin[o] = i; gvc[o] = v;
              end
            end
        if (gin[o] >= 0) ngr[gin[o]]++;
      end
      // accepts
      for (int o = 0; o < NP; o++)
        if (gin[o] >= 0) begin
          int i;
          i = gin[o];
          if (aout[i] < 0 || key(gvc[o], head_hdr[i][o][gvc[o]])
                             < key(gvc[aout[i]], head_hdr[i][aout[i]][gvc[aout[i]]]))
            aout[i] = o;
        end
      for (int o = 0; o < NP; o++) begin
        logic exp_push;
        exp_push = (gin[o] >= 0) && (aout[gin[o]] == o);
        check(out_push[o] == exp_push, "out_push");
        if (exp_push) begin
          check(out_hdr[o] == head_hdr[gin[o]][o][gvc[o]], "out_hdr");
          if (gvc[o] == 1) n_vc1++;
        end else if (gin[o] >= 0) n_idle++;
      end
      for (int i = 0; i < NP; i++) begin
        if (ngr[i] > 1) n_multi++;
        if (aout[i] >= 0) begin
          check(in_pop[i][gvc[aout[i]]] == 1'b1 && in_pop[i][1 - gvc[aout[i]]] == 1'b0, "in_pop");
          check(int'(in_port[i]) == aout[i], "in_port");
        end else begin
          check(in_pop[i] == 2'b00, "no pop");
        end
        check(lost[i] == (cand[i] && aout[i] < 0), "lost");
      end
      #9;
    end
    check(n_vc1 > 0 && n_multi > 0 && n_idle > 0, "cases seen");
    $display("vc1 transfers=%0d multi-grant inputs=%0d idle granted outputs=%0d", n_vc1, n_multi, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
