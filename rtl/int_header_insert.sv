// int_header_insert: ingress INT stage that stamps every packet.
//
// For each packet on the input stream the stage places a 10-byte INT header
// directly after the 14-byte Ethernet header:
//   bytes 12-13  EtherType, replaced by INT_ETHERTYPE (0x88B6)
//   bytes 14-21  ingress timestamp, most significant byte first
//   bytes 22-23  the packet's original EtherType (next-protocol identifier)
//   bytes 24-    the original network-layer header and payload
// and adds INT_HDR_BYTES to the packet-length metadata. This is the header
// format and behaviour of the published INT scheme; the streaming structure
// below is this design's own.
//
// How it works: inserting 10 bytes shifts every later byte of the packet by
// 10 positions, so each output beat is built from the 10 bytes carried over
// from the previous input beat plus the first BEAT_BYTES-10 bytes of the
// current one. The first beat is built from the header fields instead of the
// carry. When the last input beat holds more than BEAT_BYTES-10 bytes the
// packet grows by one beat, and the stage emits the leftover bytes in an
// extra beat, during which it does not accept input.
//
// The timestamp input is sampled in the cycle the first beat of a packet is
// accepted, which is the packet's ingress time.
//
// Interface: valid/ready handshake on both sides (AXI4-Stream rules). The
// output is one register stage: a beat accepted in cycle t appears on m_*
// in cycle t+1. Throughput is one beat per cycle except for the extra beat.
// inserted pulses for one cycle when a packet's first beat is accepted, and
// extra_beat when a packet needed the extra beat.
module int_header_insert
  import int_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [TS_WIDTH-1:0] timestamp,
  // input stream
  input  logic                s_valid,
  output logic                s_ready,
  input  axis_beat_t          s_beat,
  // output stream
  output logic                m_valid,
  input  logic                m_ready,
  output axis_beat_t          m_beat,
  // event strobes
  output logic                inserted,
  output logic                extra_beat
);

  localparam int unsigned W = BEAT_BYTES;
  localparam int unsigned H = INT_HDR_BYTES;
  localparam beat_cnt_t   WC = beat_cnt_t'(W);

  typedef enum logic [1:0] {S_FIRST, S_BODY, S_EXTRA} state_t;

  state_t                 state_q, state_d;
  logic [H-1:0][7:0]      carry_q, carry_d;
  beat_cnt_t              carry_cnt_q, carry_cnt_d;
  logic [LEN_WIDTH-1:0]   size_q, size_d;
  axis_beat_t             out_d;
  logic                   out_load;

  logic                   advance;
  logic                   s_fire;
  logic [W+H-1:0][7:0]    v;        // input beat with the 10 bytes spliced in
  beat_cnt_t              nin, nv;   // 7 bits hold up to BEAT_BYTES + 10

  assign advance = !m_valid || m_ready;
  assign s_ready = advance && (state_q != S_EXTRA);
  assign s_fire  = s_valid && s_ready;

  always_comb begin
    nin = keep_count(s_beat.keep);
    if (state_q == S_FIRST) begin
      for (int i = 0; i < W + H; i++) begin
        if (i < ETYPE_OFFSET)                 v[i] = s_beat.data[i];
        else if (i == ETYPE_OFFSET)           v[i] = INT_ETHERTYPE[15:8];
        else if (i == ETYPE_OFFSET + 1)       v[i] = INT_ETHERTYPE[7:0];
        else if (i < ETH_HDR_BYTES + TS_BYTES)
          v[i] = timestamp[TS_WIDTH-1-8*(i-ETH_HDR_BYTES) -: 8];
        else if (i == ETH_HDR_BYTES + TS_BYTES)     v[i] = s_beat.data[ETYPE_OFFSET];
        else if (i == ETH_HDR_BYTES + TS_BYTES + 1) v[i] = s_beat.data[ETYPE_OFFSET+1];
        else                                  v[i] = s_beat.data[i-H];
      end
    end else begin
      for (int i = 0; i < W + H; i++) begin
        if (i < H) v[i] = carry_q[i];
        else       v[i] = s_beat.data[i-H];
      end
    end
    nv = nin + beat_cnt_t'(H);
  end

  always_comb begin
    state_d     = state_q;
    carry_d     = carry_q;
    carry_cnt_d = carry_cnt_q;
    size_d      = size_q;
    out_d       = m_beat;
    out_load    = 1'b0;

    if (state_q == S_EXTRA) begin
      if (advance) begin
        out_load      = 1'b1;
        out_d.data    = '0;
        for (int i = 0; i < H; i++) out_d.data[i] = carry_q[i];
        out_d.keep    = keep_mask(int'(carry_cnt_q));
        out_d.last    = 1'b1;
        out_d.size    = size_q;
        state_d       = S_FIRST;
      end
    end else if (s_fire) begin
      out_load      = 1'b1;
      for (int i = 0; i < W; i++) out_d.data[i] = v[i];
      out_d.keep    = keep_mask((nv > WC) ? W : int'(nv));
      out_d.last    = s_beat.last && (nv <= WC);
      out_d.size    = s_beat.size + LEN_WIDTH'(H);
      size_d        = s_beat.size + LEN_WIDTH'(H);
      for (int i = 0; i < H; i++) carry_d[i] = v[W+i];
      carry_cnt_d   = (nv > WC) ? nv - beat_cnt_t'(W) : '0;
      if (s_beat.last) state_d = (nv > WC) ? S_EXTRA : S_FIRST;
      else             state_d = S_BODY;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q     <= S_FIRST;
      carry_q     <= '0;
      carry_cnt_q <= '0;
      size_q      <= '0;
      m_valid     <= 1'b0;
      m_beat      <= '0;
      inserted    <= 1'b0;
      extra_beat  <= 1'b0;
    end else begin
      state_q     <= state_d;
      carry_q     <= carry_d;
      carry_cnt_q <= carry_cnt_d;
      size_q      <= size_d;
      if (out_load)     m_valid <= 1'b1;
      else if (m_ready) m_valid <= 1'b0;
      if (out_load)     m_beat  <= out_d;
      inserted    <= s_fire && (state_q == S_FIRST);
      extra_beat  <= s_fire && s_beat.last && (nv > WC);
    end
  end

  // A beat offered downstream stays put until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           m_valid && !m_ready |=> m_valid && $stable(m_beat));

endmodule
