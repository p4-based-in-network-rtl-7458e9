// int_header_remove: egress INT stage that measures one-way delay and strips
// the INT header.
//
// A packet whose EtherType (bytes 12-13) is INT_ETHERTYPE (0x88B6) and that
// is long enough to hold the 10-byte INT header is treated as stamped:
//   - the local clock is sampled when its first beat arrives,
//   - the carried ingress timestamp (bytes 14-21, most significant first) is
//     extracted and the one-way delay local - carried is computed (modulo
//     2^TS_WIDTH, so a wrapped clock still gives the right difference),
//   - the original EtherType (bytes 22-23) is written back into bytes 12-13,
//   - the 10 header bytes are removed and the length metadata is reduced by
//     INT_HDR_BYTES.
// Every other packet passes through unchanged, so the stage can sit in front
// of ordinary forwarding. The behaviour is that of the published egress step;
// the streaming structure and the delay report port are this design's own.
//
// How it works: removing 10 bytes pulls every later byte 10 positions
// forward, so an output beat is the last BEAT_BYTES-10 bytes held back from
// the previous input beat followed by the first 10 bytes of the current one.
// The first beat of a stamped packet is therefore held (unless it is also
// the last) and produces no output; when the last input beat carries more
// than 10 bytes, the held remainder leaves in one more beat. During that
// trailing beat only the first beat of another stamped, multi-beat packet is
// accepted (it produces no output, so it does not compete for the output
// register); any other input waits one cycle.
//
// Interface: valid/ready handshake on both sides. Output is one register
// stage. delay_valid pulses for one cycle, the cycle after the first beat of
// a stamped packet is accepted, with delay, ts_ingress (carried) and
// ts_egress (local) valid in that cycle and held until the next report.
// flush_beat pulses when a stamped packet needed the trailing beat, passed
// when a packet without INT header went through.
module int_header_remove
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
  // one-way delay report
  output logic                delay_valid,
  output logic [TS_WIDTH-1:0] delay,
  output logic [TS_WIDTH-1:0] ts_ingress,
  output logic [TS_WIDTH-1:0] ts_egress,
  // event strobes
  output logic                flush_beat,
  output logic                passed
);

  localparam int unsigned W = BEAT_BYTES;
  localparam int unsigned H = INT_HDR_BYTES;
  localparam beat_cnt_t   HC = beat_cnt_t'(H);
  localparam beat_cnt_t   MINC = beat_cnt_t'(INT_MIN_BYTES);

  typedef enum logic [1:0] {S_FIRST, S_PASS, S_BODY, S_FLUSH} state_t;

  state_t                 state_q, state_d;
  logic [W-H-1:0][7:0]    res_q, res_d;      // held-back bytes
  beat_cnt_t              res_cnt_q, res_cnt_d;
  logic [LEN_WIDTH-1:0]   size_q, size_d;
  axis_beat_t             out_d;
  logic                   out_load;

  logic                   advance, s_fire;
  logic                   is_int;
  logic [TS_WIDTH-1:0]    carried_ts;
  logic [W-H-1:0][7:0]    stripped;          // first beat without the header
  beat_cnt_t              nin;

  assign advance = !m_valid || m_ready;
  // While the trailing beat leaves, the first beat of a following stamped
  // packet can still be taken, because it produces no output of its own.
  assign s_ready = advance &&
                   (state_q != S_FLUSH || (is_int && !s_beat.last));
  assign s_fire  = s_valid && s_ready;

  always_comb begin
    nin    = keep_count(s_beat.keep);
    is_int = (nin >= MINC) &&
             ({s_beat.data[ETYPE_OFFSET], s_beat.data[ETYPE_OFFSET+1]} == INT_ETHERTYPE);
    for (int i = 0; i < TS_BYTES; i++)
      carried_ts[TS_WIDTH-1-8*i -: 8] = s_beat.data[ETH_HDR_BYTES+i];
    // Header bytes removed: bytes 22-23 (next protocol) land on 12-13 and
    // the network-layer header follows them.
    for (int i = 0; i < W - H; i++)
      stripped[i] = (i < ETYPE_OFFSET) ? s_beat.data[i] : s_beat.data[i+H];
  end

  always_comb begin
    state_d   = state_q;
    res_d     = res_q;
    res_cnt_d = res_cnt_q;
    size_d    = size_q;
    out_d     = m_beat;
    out_load  = 1'b0;

    unique case (state_q)
      S_FIRST: if (s_fire) begin
        if (is_int) begin
          res_d     = stripped;
          res_cnt_d = nin - beat_cnt_t'(H);
          size_d    = s_beat.size - LEN_WIDTH'(H);
          if (s_beat.last) begin
            out_load   = 1'b1;
            out_d.data = '0;
            for (int i = 0; i < W - H; i++) out_d.data[i] = stripped[i];
            out_d.keep = keep_mask(int'(nin) - H);
            out_d.last = 1'b1;
            out_d.size = size_d;
          end else begin
            state_d = S_BODY;
          end
        end else begin
          out_load = 1'b1;
          out_d    = s_beat;
          if (!s_beat.last) state_d = S_PASS;
        end
      end

      S_PASS: if (s_fire) begin
        out_load = 1'b1;
        out_d    = s_beat;
        if (s_beat.last) state_d = S_FIRST;
      end

      S_BODY: if (s_fire) begin
        out_load = 1'b1;
        for (int i = 0; i < W; i++)
          out_d.data[i] = (i < W - H) ? res_q[i] : s_beat.data[i-(W-H)];
        out_d.keep = keep_mask((nin > HC) ? W : (W - H + int'(nin)));
        out_d.last = s_beat.last && (nin <= HC);
        out_d.size = size_q;
        for (int i = 0; i < W - H; i++) res_d[i] = s_beat.data[i+H];
        res_cnt_d  = (nin > HC) ? nin - beat_cnt_t'(H) : '0;
        if (s_beat.last) state_d = (nin > HC) ? S_FLUSH : S_FIRST;
      end

      S_FLUSH: if (advance) begin
        out_load   = 1'b1;
        out_d.data = '0;
        for (int i = 0; i < W - H; i++) out_d.data[i] = res_q[i];
        out_d.keep = keep_mask(int'(res_cnt_q));
        out_d.last = 1'b1;
        out_d.size = size_q;
        state_d    = S_FIRST;
        if (s_fire) begin
          res_d     = stripped;
          res_cnt_d = nin - beat_cnt_t'(H);
          size_d    = s_beat.size - LEN_WIDTH'(H);
          state_d   = S_BODY;
        end
      end

      default: state_d = S_FIRST;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q     <= S_FIRST;
      res_q       <= '0;
      res_cnt_q   <= '0;
      size_q      <= '0;
      m_valid     <= 1'b0;
      m_beat      <= '0;
      delay_valid <= 1'b0;
      delay       <= '0;
      ts_ingress  <= '0;
      ts_egress   <= '0;
      flush_beat  <= 1'b0;
      passed      <= 1'b0;
    end else begin
      state_q     <= state_d;
      res_q       <= res_d;
      res_cnt_q   <= res_cnt_d;
      size_q      <= size_d;
      if (out_load)     m_valid <= 1'b1;
      else if (m_ready) m_valid <= 1'b0;
      if (out_load)     m_beat  <= out_d;
      delay_valid <= 1'b0;
      if (s_fire && (state_q == S_FIRST || state_q == S_FLUSH) && is_int) begin
        delay_valid <= 1'b1;
        delay       <= timestamp - carried_ts;
        ts_ingress  <= carried_ts;
        ts_egress   <= timestamp;
      end
      flush_beat  <= s_fire && state_q == S_BODY && s_beat.last && (nin > HC);
      passed      <= s_fire && state_q == S_FIRST && !is_int;
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           m_valid && !m_ready |=> m_valid && $stable(m_beat));

endmodule
