// deadline_stamper: the flow table of an end host. It cuts each message handed down
// by the application into packets of at most one MTU and stamps every packet with a
// deadline and an eligible time.
//
// For a flow in RATE mode (most flows, and control traffic with the link rate as its
// bandwidth) the deadline of packet i is
//     D(i) = max(D(i-1), Tnow) + L(i) / BW
// where Tnow is the host clock when the message was accepted, L the packet length
// and 1/BW the flow's reserved rate, stored as cycles per byte (unsigned Q16.16).
// The quotient is rounded up and is at least one cycle, so a flow's deadlines always
// strictly increase. For a flow in FRAME mode (video) the increment is instead the
// flow's target frame latency divided by the number of packets in the frame,
// Parts = ceil(bytes / MTU); this division is done once per message by a
// shift-subtract divider, one quotient bit per cycle. The eligible time is
// D - ELIG_OFFSET for flows that use it and Tnow (eligible at once) otherwise.
//
// Interface: cfg_we/cfg_flow/cfg_data write a flow entry and restart its deadline
// chain; msg_valid/msg_ready/msg_flow/msg_bytes accept a message; pkt_valid/
// pkt_ready/pkt give one stamped packet per cycle; the header's flow field is the
// host number (SRC_ID) followed by the flow-table index. t_local is the host clock.
// Latency: the first packet is offered one cycle after the message is accepted
// (RATE) or after 25 more cycles (FRAME). Some header bits leave this block as
// constants: the hop pointer and CRC (zero; the link stage fills the CRC) and the
// host-number part of the flow field (SRC_ID).
//
// The two deadline formulas, the eligible-time rule and its 20 us offset follow the
// document. The flow-table size, the Q16.16 rate format, rounding, and the
// per-flow sequence number are this design's choices.
module deadline_stamper
  import edf_pkg::*;
#(
  parameter int unsigned NFLOWS      = 16,
  parameter int unsigned ELIG_OFFSET = 2500,   // 20 us at 125 MHz
  parameter int unsigned MSGW        = 20,     // message length field, bytes
  parameter int unsigned SRC_ID      = 0       // host number, upper bits of the flow id
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  time_t                      t_local,
  input  logic                       cfg_we,
  input  logic [$clog2(NFLOWS)-1:0]  cfg_flow,
  input  flow_cfg_t                  cfg_data,
  input  logic                       msg_valid,
  output logic                       msg_ready,
  input  logic [$clog2(NFLOWS)-1:0]  msg_flow,
  input  logic [MSGW-1:0]            msg_bytes,
  output logic                       pkt_valid,
  input  logic                       pkt_ready,
  output host_pkt_t                  pkt,
  output logic                       ev_divide    // a frame increment was computed
);
  localparam int unsigned FW   = $clog2(NFLOWS);
  localparam int unsigned MTUB = $clog2(MTU);
  localparam int unsigned PW   = MSGW - MTUB + 1;   // parts per message
  localparam int unsigned QW   = 24;                // frame latency / quotient width

  typedef enum logic [1:0] {S_IDLE, S_DIV, S_EMIT} state_e;

  flow_cfg_t         cfg      [NFLOWS];
  time_t             last_dl  [NFLOWS];
  logic [NFLOWS-1:0] fresh;
  logic [SEQW-1:0]   seq      [NFLOWS];

  state_e          state;
  logic [FW-1:0]   cur_flow;
  logic [MSGW-1:0] remaining;
  time_t           t_msg;
  logic [QW-1:0]   frame_inc;
  // divider
  logic [PW-1:0]   rem_div;
  logic [PW-1:0]   divisor;
  logic [4:0]      div_bit;

  flow_cfg_t       c;
  logic [LENW-1:0] len;
  logic [47:0]     prod;
  time_t           inc, base, dl;

  assign c = cfg[cur_flow];

  always_comb begin
    len  = (remaining > MSGW'(MTU)) ? LENW'(MTU) : LENW'(remaining);
    prod = 48'(len) * 48'(c.cpb);
    if (c.mode == MODE_FRAME) inc = time_t'(frame_inc);
    else                      inc = time_t'((prod + 48'hFFFF) >> 16);
    if (inc == '0) inc = time_t'(1);
    base = (fresh[cur_flow] || dl_before(last_dl[cur_flow], t_msg)) ? t_msg : last_dl[cur_flow];
    dl   = base + inc;

    pkt           = '0;
    pkt.hdr.vc    = c.vc;
    pkt.hdr.dl    = dl;
    pkt.hdr.len   = len;
    pkt.hdr.route = c.route;
    pkt.hdr.hop   = '0;
    pkt.hdr.flow  = FLOWW'((SRC_ID << FW) | int'(cur_flow));
    pkt.hdr.seq   = seq[cur_flow];
    pkt.elig      = c.use_elig ? dl - time_t'(ELIG_OFFSET) : t_msg;
  end

  assign msg_ready = (state == S_IDLE) && !cfg_we;
  assign pkt_valid = (state == S_EMIT);

  // Restoring division step: shift in one dividend bit, subtract if possible.
  logic [PW:0] trial;
  assign trial = {rem_div, frame_inc[QW-1]} - {1'b0, divisor};

  always_ff @(posedge clk) begin
    ev_divide <= 1'b0;
    if (!rst_n) begin
      state     <= S_IDLE;
      fresh     <= '1;
      cur_flow  <= '0;
      remaining <= '0;
      t_msg     <= '0;
      frame_inc <= '0;
      rem_div   <= '0;
      divisor   <= '0;
      div_bit   <= '0;
      for (int f = 0; f < NFLOWS; f++) begin
        seq[f]     <= '0;
        last_dl[f] <= '0;
        cfg[f]     <= '0;
      end
    end else begin
      if (cfg_we) begin
        cfg[cfg_flow]   <= cfg_data;
        fresh[cfg_flow] <= 1'b1;
      end
      unique case (state)
        S_IDLE: if (msg_valid && msg_ready) begin
          cur_flow  <= msg_flow;
          remaining <= (msg_bytes == '0) ? MSGW'(1) : msg_bytes;
          t_msg     <= t_local;
          if (cfg[msg_flow].mode == MODE_FRAME) begin
            // dividend shifts through frame_inc, quotient bits enter at the bottom
            frame_inc <= cfg[msg_flow].frame_lat;
            divisor   <= (msg_bytes == '0) ? PW'(1) : PW'((msg_bytes + MSGW'(MTU - 1)) >> MTUB);
            rem_div   <= '0;
            div_bit   <= 5'(QW);
            state     <= S_DIV;
          end else begin
            state <= S_EMIT;
          end
        end
        S_DIV: begin
          if (!trial[PW]) begin
            rem_div   <= trial[PW-1:0];
            frame_inc <= {frame_inc[QW-2:0], 1'b1};
          end else begin
            rem_div   <= {rem_div[PW-2:0], frame_inc[QW-1]};
            frame_inc <= {frame_inc[QW-2:0], 1'b0};
          end
          div_bit <= div_bit - 5'd1;
          if (div_bit == 5'd1) begin
            state     <= S_EMIT;
            ev_divide <= 1'b1;
          end
        end
        S_EMIT: if (pkt_ready) begin
          last_dl[cur_flow] <= dl;
          fresh[cur_flow]   <= 1'b0;
          seq[cur_flow]     <= seq[cur_flow] + SEQW'(1);
          remaining         <= remaining - MSGW'(len);
          if (remaining <= MSGW'(MTU)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_cfg_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                        cfg_we |-> state == S_IDLE);
endmodule
