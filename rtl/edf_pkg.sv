// edf_pkg: types, constants and helper functions shared by every block of the
// deadline-scheduled (EDF) interconnect.
//
// Time is counted in clock cycles of a 64-bit, 125 MHz link datapath, which
// carries the 8 Gb/s link rate (8 bytes per cycle). Every node owns a free-running
// 32-bit local clock; nodes are never synchronised. Deadlines inside a node are
// absolute local-clock values; on a link the same header field carries the
// time-to-deadline (TTD), which is a signed cycle count. Deadlines are compared with
// serial-number arithmetic (the sign of the 32-bit difference) so that clock
// wrap-around is harmless as long as live deadlines lie within 2^31 cycles of each
// other.
//
// Buffer space and link credits are counted in 128-byte units (the smallest
// application message); 8 Kbytes of buffer per VC is therefore 64 units, and each
// packet, whatever its length, takes one descriptor slot and at least one unit.
//
// What follows the document: the two virtual channels (VC 0 regulated, VC 1
// best-effort), the deadline tag, the routing field, TTD on the wire, a header CRC
// recomputed at every hop, 16-port switches, 8 Kbytes per VC, 8 Gb/s links, 2-Kbyte
// MTU. This design's own choices: the field widths, the 125 MHz clock, the 128-byte
// credit unit, the CRC-8 polynomial, source routing with 8 hop entries.
package edf_pkg;

  localparam int unsigned TW          = 32;   // time / deadline width
  localparam int unsigned LENW        = 12;   // packet length in bytes (1..2048)
  localparam int unsigned MAXHOPS     = 8;    // source-route entries
  localparam int unsigned PORTW       = 4;    // output-port field (16 ports)
  localparam int unsigned HOPW        = 3;    // hop pointer
  localparam int unsigned FLOWW       = 8;    // flow identifier
  localparam int unsigned SEQW        = 16;   // per-flow sequence number
  localparam int unsigned MTU         = 2048; // bytes
  localparam int unsigned BYTES_PER_CYCLE = 8;   // 8 Gb/s at 125 MHz
  localparam int unsigned UNIT_BYTES  = 128;     // credit / buffer unit
  localparam int unsigned VC_BYTES    = 8192;    // buffer per VC
  localparam int unsigned VC_UNITS    = VC_BYTES / UNIT_BYTES; // 64
  localparam int unsigned UNITW       = 8;       // wide enough for 0..VC_UNITS+16

  typedef logic [TW-1:0] time_t;

  // Packet header. dl is an absolute local deadline inside a node and the
  // time-to-deadline while on a link. flow and seq identify the packet end to end;
  // the switches never look at them.
  typedef struct packed {
    logic                          vc;     // 0 regulated, 1 best-effort
    time_t                         dl;     // deadline (node) or TTD (link)
    logic [LENW-1:0]               len;    // bytes
    logic [MAXHOPS-1:0][PORTW-1:0] route;  // output port at each hop
    logic [HOPW-1:0]               hop;    // index of the next route entry
    logic [FLOWW-1:0]              flow;
    logic [SEQW-1:0]               seq;
    logic [7:0]                    crc;    // header CRC (valid on links)
  } hdr_t;

  localparam int unsigned HDRW = $bits(hdr_t);

  // One direction of a link: at most one header per cycle.
  typedef struct packed {
    logic valid;
    hdr_t hdr;
  } link_t;

  // Credit return channel, in buffer units, one count per VC per cycle.
  typedef struct packed {
    logic [1:0][UNITW-1:0] units;
  } credit_t;

  // Host flow-table entry. mode RATE: increment = L * cpb (cycles per byte,
  // unsigned Q16.16). mode FRAME: increment = frame_lat / Parts(F).
  typedef enum logic {MODE_RATE = 1'b0, MODE_FRAME = 1'b1} flow_mode_e;

  typedef struct packed {
    logic                          vc;
    flow_mode_e                    mode;
    logic                          use_elig;
    logic [31:0]                   cpb;        // Q16.16 cycles per byte
    logic [23:0]                   frame_lat;  // cycles
    logic [MAXHOPS-1:0][PORTW-1:0] route;
  } flow_cfg_t;

  // Packet waiting in a host: header plus its eligible time.
  typedef struct packed {
    hdr_t  hdr;
    time_t elig;
  } host_pkt_t;

  // a is earlier than b (wrap-safe).
  function automatic logic dl_before(time_t a, time_t b);
    time_t d;
    d = a - b;
    return d[TW-1];
  endfunction

  // Buffer units taken by a packet of len bytes: ceil(len / 128), at least 1.
  function automatic logic [UNITW-1:0] pkt_units(logic [LENW-1:0] len);
    logic [LENW:0] u;
    u = ({1'b0, len} + (LENW+1)'(UNIT_BYTES - 1)) >> $clog2(UNIT_BYTES);
    if (u == '0) u = 1;
    return UNITW'(u);
  endfunction

  // Link cycles a packet occupies: ceil(len / 8), at least 1.
  function automatic logic [LENW-1:0] pkt_cycles(logic [LENW-1:0] len);
    logic [LENW:0] c;
    c = ({1'b0, len} + (LENW+1)'(BYTES_PER_CYCLE - 1)) >> $clog2(BYTES_PER_CYCLE);
    if (c == '0) c = 1;
    return LENW'(c);
  endfunction

  // Output port the packet takes at the current hop.
  function automatic logic [PORTW-1:0] hdr_port(hdr_t h);
    return h.route[h.hop];
  endfunction

  // CRC-8, polynomial x^8 + x^2 + x + 1 (0x07), initial value 0, over every
  // header bit except the CRC field itself, most significant bit first.
  function automatic logic [7:0] hdr_crc(hdr_t h);
    logic [HDRW-9:0] bits;
    logic [7:0]      c;
    logic            fb;
    bits = h[HDRW-1:8];
    c = '0;
    for (int i = HDRW - 9; i >= 0; i--) begin
      fb = c[7] ^ bits[i];
      c  = {c[6:0], 1'b0};
      if (fb) c = c ^ 8'h07;
    end
    return c;
  endfunction

endpackage
