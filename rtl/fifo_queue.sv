// fifo_queue: the common queue of the best-effort virtual channel (VC 1): a plain
// first-in first-out queue of packet headers.
//
// A circular buffer of DEPTH entries with read and write pointers and a count.
// Interface: push/push_hdr (the caller guarantees space through credits),
// head_valid/head_hdr (combinational view of the oldest entry), pop, cnt. One push
// and one pop per cycle; a pushed packet is visible from the next cycle.
//
// The document gives the best-effort VC one FIFO queue; the depth (one slot per
// 128-byte buffer unit of an 8-Kbyte VC) is this design's choice.
module fifo_queue
  import edf_pkg::*;
#(
  parameter int unsigned DEPTH = VC_UNITS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  hdr_t push_hdr,
  output logic head_valid,
  output hdr_t head_hdr,
  input  logic pop,
  output logic [$clog2(DEPTH+1)-1:0] cnt
);
  localparam int unsigned IW = $clog2(DEPTH);

  hdr_t          mem [DEPTH];
  logic [IW-1:0] rd_ptr, wr_ptr;

  assign head_valid = (cnt != '0);
  assign head_hdr   = mem[rd_ptr];

  function automatic logic [IW-1:0] incr(logic [IW-1:0] p);
    return (p == IW'(DEPTH - 1)) ? '0 : p + IW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (push) wr_ptr <= incr(wr_ptr);
      if (pop)  rd_ptr <= incr(rd_ptr);
      cnt <= cnt + $bits(cnt)'(push) - $bits(cnt)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= push_hdr;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  push |-> (cnt != $bits(cnt)'(DEPTH) || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   pop |-> head_valid);
endmodule
