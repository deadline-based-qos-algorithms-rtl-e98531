// link_tx_tb: self-checking test of the egress stage.
//
// Random headers with random absolute deadlines leave through two copies of the
// stage, one as in a switch (hop pointer advanced) and one as in a host. Each output,
// one cycle later, must carry TTD = deadline - local clock (modulo 2^32, including
// negative TTDs of late packets), the right hop pointer, every other field unchanged
// and a header CRC equal to a reference CRC computed by long division.
module link_tx_tb;
  import edf_pkg::*;
  import crc8_ref::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  hdr_t in_hdr = '0;
  time_t t_local = '0;
  link_t out_sw, out_host;

  int checks = 0, failures = 0;

  link_tx #(.ADVANCE_HOP(1'b1)) dut_sw   (.clk, .rst_n, .in_valid, .in_hdr, .t_local, .link_out(out_sw));
  link_tx #(.ADVANCE_HOP(1'b0)) dut_host (.clk, .rst_n, .in_valid, .in_hdr, .t_local, .link_out(out_host));
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  initial begin
    hdr_t h, e;
    logic v_prev;
    hdr_t h_prev;
    time_t t_prev;
    v_prev = 1'b0; h_prev = '0; t_prev = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      // check what the previous cycle sent
      check(out_sw.valid == v_prev && out_host.valid == v_prev, "valid");
      if (v_prev) begin
        e = h_prev;
        e.dl  = h_prev.dl - t_prev;
        e.hop = h_prev.hop + 1'b1;
        e.crc = ref_crc(e);
        check(out_sw.hdr == e, "switch egress header");
        e.hop = h_prev.hop;
        e.crc = ref_crc(e);
        check(out_host.hdr == e, "host egress header");
      end
      h = hdr_t'({$urandom, $urandom, $urandom, $urandom});
      if (cyc % 3 == 0) h.dl = t_local + time_t'($urandom_range(0, 5000)) - time_t'(100);
      in_valid = ($urandom_range(0, 99) < 70);
      in_hdr   = h;
      t_local  = time_t'($urandom);
      v_prev = in_valid; h_prev = h; t_prev = t_local;
      if (cyc % 3 == 0) begin
        t_local = h.dl - time_t'($urandom_range(0, 5000)) + time_t'(100);
        t_prev = t_local;
      end
    end
    // a fixed example: deadline 1000 at local time 400 leaves with TTD 600
    @(negedge clk);
    in_valid = 1'b1; in_hdr = '0; in_hdr.dl = 1000; t_local = 400;
    @(negedge clk);
    check(out_sw.hdr.dl == 600, "TTD example");
    check(out_sw.hdr.hop == 1 && out_host.hdr.hop == 0, "hop example");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
