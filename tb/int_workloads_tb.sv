// int_workloads_tb: the measurement scenarios of the INT scheme, run on the
// full two-node design at its default sizes.
//
//   A. Behavioural run: eight frames, the first the 89-byte UDP/IPv4 sample
//      frame, stamped while the ingress clock is held at zero, then passed
//      through the egress stage. Stamped frames must carry an all-zero
//      timestamp and next-protocol 0x0800 after EtherType 0x88b6; the egress
//      output must equal the original frames.
//   B. Two-node run with running clocks: the same frames, the ingress clock
//      loaded so the sample frame is stamped 0x0000007fd1547f28; the stamped
//      bytes after the MAC addresses must read 88b6 0000 007f d154 7f28 0800
//      4503 004b, the egress output must equal the input and each frame must
//      give a delay report equal to the fixed path latency.
//   C. 188-byte UDP/IPv4 frames (IPv4 total length 174) stamped at ingress
//      only, as seen by a plain NIC: 198 bytes and the length metadata 198.
//   D. Interactive traffic: full-size 1514-byte frames end to end.
// The network between the nodes is a fixed-latency FIFO.
module int_workloads_tb;
  import int_pkg::*;
  import int_tb_pkg::*;

  localparam int LINK_CYCLES = 8;

  logic clk = 0;
  always #2 clk = ~clk;
  logic rst_n = 0;

  logic        ing_ts_load = 0, eg_ts_load = 0;
  logic [63:0] ing_ts_load_value = '0, eg_ts_load_value = '0;
  logic [63:0] ing_timestamp, eg_timestamp;
  logic        ing_s_valid, ing_s_ready, ing_m_valid, ing_m_ready;
  axis_beat_t  ing_s_beat, ing_m_beat;
  logic        ing_inserted, ing_extra_beat;
  logic        eg_s_valid, eg_s_ready, eg_m_valid, eg_m_ready;
  axis_beat_t  eg_s_beat, eg_m_beat;
  logic        delay_valid, eg_flush_beat, eg_passed;
  logic [63:0] delay, ts_ingress, ts_egress;

  int checks = 0, failures = 0;

  int_telemetry_top dut (
    .ing_clk(clk), .ing_rst_n(rst_n), .ing_ts_load, .ing_ts_load_value, .ing_timestamp,
    .ing_s_valid, .ing_s_ready, .ing_s_beat, .ing_m_valid, .ing_m_ready, .ing_m_beat,
    .ing_inserted, .ing_extra_beat,
    .eg_clk(clk), .eg_rst_n(rst_n), .eg_ts_load, .eg_ts_load_value, .eg_timestamp,
    .eg_s_valid, .eg_s_ready, .eg_s_beat, .eg_m_valid, .eg_m_ready, .eg_m_beat,
    .delay_valid, .delay, .ts_ingress, .ts_egress, .eg_flush_beat, .eg_passed
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Collected frames on the wire between the nodes and at the egress output.
  pkt_t wire_q[$], out_q[$];
  logic [LEN_WIDTH-1:0] wire_len_q[$];
  pkt_t wcur, ocur;
  bit   link_on = 1;     // 0: the egress node is a plain NIC, frames end on the wire
  logic [63:0] delays[$];

  typedef struct { axis_beat_t beat; longint due; } link_t;
  link_t link_q[$];

  assign ing_m_ready = 1'b1;
  assign eg_m_ready  = 1'b1;

  always @(posedge clk) if (rst_n) begin
    if (ing_m_valid) begin
      link_t l;
      for (int i = 0; i < BEAT_BYTES; i++) if (ing_m_beat.keep[i]) wcur.push_back(ing_m_beat.data[i]);
      if (ing_m_beat.last) begin
        wire_q.push_back(wcur);
        wire_len_q.push_back(ing_m_beat.size);
        wcur = {};
      end
      l.beat = ing_m_beat;
      l.due  = cyc + LINK_CYCLES;
      if (link_on) link_q.push_back(l);
    end
    if (eg_m_valid) begin
      for (int i = 0; i < BEAT_BYTES; i++) if (eg_m_beat.keep[i]) ocur.push_back(eg_m_beat.data[i]);
      if (eg_m_beat.last) begin
        out_q.push_back(ocur);
        ocur = {};
      end
    end
    if (delay_valid) delays.push_back(delay);
  end

  logic eg_took;
  always @(posedge clk) eg_took <= eg_s_valid && eg_s_ready;
  always @(negedge clk) begin
    if (eg_s_valid && eg_took) void'(link_q.pop_front());
    eg_s_valid = link_q.size() != 0 && link_q[0].due <= cyc;
    if (eg_s_valid) eg_s_beat = link_q[0].beat;
  end

  task automatic send(pkt_t p);
    int nb;
    axis_beat_t bt;
    nb = (p.size() + BEAT_BYTES - 1) / BEAT_BYTES;
    for (int b = 0; b < nb; b++) begin
      bit took;
      bt = '0;
      for (int i = 0; i < BEAT_BYTES; i++)
        if (b * BEAT_BYTES + i < p.size()) bt.data[i] = p[b*BEAT_BYTES+i];
      bt.keep = keep_mask((b == nb - 1) ? p.size() - b * BEAT_BYTES : BEAT_BYTES);
      bt.last = (b == nb - 1);
      bt.size = LEN_WIDTH'(p.size());
      @(negedge clk);
      ing_s_valid = 1;
      ing_s_beat  = bt;
      do begin
        #1 took = ing_s_ready;
        @(posedge clk);
        if (!took) @(negedge clk);
      end while (!took);
    end
    @(negedge clk);
    ing_s_valid = 0;
    repeat (LINK_CYCLES + 12) @(posedge clk);
  endtask

  task automatic set_ing_clock(bit hold, logic [63:0] v);
    @(negedge clk);
    ing_ts_load = 1; ing_ts_load_value = v;
    eg_ts_load  = !hold; eg_ts_load_value = v;
    if (!hold) begin
      @(negedge clk);
      ing_ts_load = 0;
      eg_ts_load  = 0;
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pkt_t frames[8];
  initial begin
    pkt_t fab;
    ing_s_valid = 0;
    ing_s_beat  = '0;
    eg_s_valid  = 0;
    eg_s_beat   = '0;
    frames[0] = sample_frame();
    for (int k = 1; k < 8; k++) frames[k] = random_frame($urandom_range(60, 200), 16'h0800);
    repeat (4) @(posedge clk);
    rst_n <= 1;

    // A. ingress clock held at zero
    set_ing_clock(1, 64'd0);
    foreach (frames[k]) send(frames[k]);
    @(negedge clk);
    ing_ts_load = 0;
    check(wire_q.size() == 8 && out_q.size() == 8, "A: eight frames stamped and restored");
    foreach (frames[k]) begin
      pkt_t w;
      w = wire_q.pop_front();
      check(same(w, ref_insert(frames[k], 64'd0)), $sformatf("A: frame %0d stamped with zero time", k));
      check(same(out_q.pop_front(), frames[k]), $sformatf("A: frame %0d restored", k));
      check(wire_len_q.pop_front() == LEN_WIDTH'(frames[k].size() + 10), "A: length metadata");
    end
    delays = {};

    // B. running, synchronised clocks
    set_ing_clock(0, 64'h0000_007f_d154_7f28 - 64'd1);
    foreach (frames[k]) send(frames[k]);
    begin
      pkt_t w;
      byte unsigned exp_b[16] = '{8'h88,8'hb6,8'h00,8'h00,8'h00,8'h7f,8'hd1,8'h54,8'h7f,8'h28,
                                  8'h08,8'h00,8'h45,8'h03,8'h00,8'h4b};
      bit ok;
      ok = 1;
      w = wire_q[0];
      foreach (exp_b[i]) if (w[12+i] != exp_b[i]) ok = 0;
      check(ok, "B: sample frame stamped 0x0000007fd1547f28");
    end
    check(out_q.size() == 8 && delays.size() == 8, "B: eight frames and eight delay reports");
    foreach (frames[k]) begin
      check(same(out_q.pop_front(), frames[k]), $sformatf("B: frame %0d restored", k));
      check(delays[k] == 64'(LINK_CYCLES + 1), $sformatf("B: delay %0d", delays[k]));
    end
    wire_q = {}; wire_len_q = {}; delays = {};

    // C. 188-byte frames captured at a plain NIC: stamped only.
    link_on = 0;
    fab = '{8'h11,8'h11,8'h11,8'h11,8'h11,8'h11, 8'haa,8'haa,8'haa,8'haa,8'haa,8'haa, 8'h08,8'h00,
            8'h4f,8'hc9,8'h00,8'hae,8'h50,8'hfa,8'h00,8'h00,8'hb3,8'h11,8'hd3,8'h86,
            8'hfd,8'h5f,8'h0b,8'hc8,8'h9a,8'haa,8'h20,8'h10};
    while (fab.size() < 188) fab.push_back(byte'($urandom));
    for (int k = 0; k < 8; k++) send(fab);
    check(wire_q.size() == 8, "C: eight stamped frames on the wire");
    for (int k = 0; k < 8 && wire_q.size() != 0; k++) begin
      pkt_t w;
      w = wire_q.pop_front();
      check(w.size() == 198 && wire_len_q.pop_front() == 16'd198, "C: 188-byte frame stamped to 198 bytes");
      check(w[12] == 8'h88 && w[13] == 8'hb6 && w[22] == 8'h08 && w[23] == 8'h00, "C: INT EtherType and next protocol");
      check(same(ref_remove(w), fab), "C: rest of the frame unchanged");
    end
    check(out_q.size() == 0, "C: nothing reaches the egress stage");
    link_on = 1;

    // D. full-size frames end to end
    for (int k = 0; k < 4; k++) begin
      pkt_t f, o;
      f = random_frame(1514, 16'h0800);
      send(f);
      check(out_q.size() == 1, "D: one frame out");
      o = out_q.pop_front();
      check(same(o, f), "D: 1514-byte frame end to end");
    end
    check(delays.size() == 4, "D: four delay reports");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
