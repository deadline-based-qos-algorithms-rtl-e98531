// link_rx_tb: self-checking test of the ingress stage.
//
// Headers carrying a time-to-deadline and a reference CRC arrive at random local
// clock values; about one in five has one header bit flipped. A good packet must
// come out one cycle later with deadline = TTD + local clock and all other fields
// unchanged; a corrupted one must not come out, must raise crc_err and must report
// its buffer units (ceil(len/128)) on its VC for credit return.
module link_rx_tb;
  import edf_pkg::*;
  import crc8_ref::*;

  logic clk = 1'b0, rst_n = 1'b0;
  link_t link_in = '0;
  time_t t_local = '0;
  logic out_valid, crc_err;
  hdr_t out_hdr;
  logic [1:0][UNITW-1:0] drop_units;

  int checks = 0, failures = 0, n_bad = 0, n_good = 0;

  link_rx dut (.*);
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
    logic v_prev, bad_prev;
    hdr_t h_prev;
    time_t t_prev;
    int u;
    v_prev = 1'b0; bad_prev = 1'b0; h_prev = '0; t_prev = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      check(out_valid == (v_prev && !bad_prev), "out_valid");
      check(crc_err == (v_prev && bad_prev), "crc_err");
      if (v_prev && !bad_prev) begin
        e = h_prev;
        e.dl = h_prev.dl + t_prev;
        check(out_hdr == e, "rebuilt header");
      end
      u = (int'(h_prev.len) + 127) / 128;
      if (u == 0) u = 1;
      for (int v = 0; v < 2; v++)
        check(int'(drop_units[v]) == ((v_prev && bad_prev && int'(h_prev.vc) == v) ? u : 0), "drop units");
      h = hdr_t'({$urandom, $urandom, $urandom, $urandom});
      h.crc = ref_crc(h);
      link_in.valid = ($urandom_range(0, 99) < 70);
      bad_prev = 1'b0;
      if ($urandom_range(0, 99) < 20) begin
        int b;
        b = $urandom_range(0, HDRW - 1);
        link_in.hdr = h;
        link_in.hdr[b] = ~h[b];
        bad_prev = 1'b1;
        h = link_in.hdr;
      end else begin
        link_in.hdr = h;
      end
      if (link_in.valid) begin
        if (bad_prev) n_bad++; else n_good++;
      end
      t_local = time_t'($urandom);
      v_prev = link_in.valid; h_prev = h; t_prev = t_local;
    end
    // a fixed example: TTD 600 arriving at local time 32'hFFFF_FF00 gives deadline 0x258 - 0x100
    @(negedge clk);
    h = '0; h.dl = 600; h.crc = ref_crc(h);
    link_in.valid = 1'b1; link_in.hdr = h; t_local = 32'hFFFF_FF00;
    @(negedge clk);
    check(out_valid && out_hdr.dl == 32'd344, "deadline example");
    check(n_bad > 0 && n_good > 0, "both cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
