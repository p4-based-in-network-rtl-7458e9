// int_header_remove_tb: self-checking test of the egress INT stage.
//
// Feeds the stamped sample frame (zero timestamp and timestamp
// 0x0000007fd1547f28) and checks that the original frame comes out, then
// mixes stamped frames of every length around the beat boundaries, frames
// without the INT EtherType and frames too short to carry the header, under
// random input gaps and output back-pressure. Each output is compared with a
// byte-level reference; each stamped frame must give one delay report whose
// carried and local timestamps and difference match the testbench's own
// clock. Also checks the length metadata, the throughput of back-to-back
// stamped traffic (two input beats plus one trailing beat per packet) and the
// event strobes.
module int_header_remove_tb;
  import int_pkg::*;
  import int_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;

  logic [63:0] timestamp;
  logic s_valid, s_ready, m_valid, m_ready;
  axis_beat_t s_beat, m_beat;
  logic delay_valid;
  logic [63:0] delay, ts_ingress, ts_egress;
  logic flush_beat, passed;

  int checks = 0, failures = 0;

  int_header_remove dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [63:0] ts_base = 64'd0;
  logic        ts_set  = 1'b0;
  always_ff @(posedge clk) timestamp <= ts_set ? ts_base : timestamp + 1;

  typedef struct {
    logic [63:0] carried;
    logic [63:0] local_ts;
    longint      due;
  } rep_t;

  pkt_t in_q[$];
  pkt_t exp_q[$];
  rep_t rep_q[$];
  int   exp_flush = 0, got_flush = 0, exp_pass = 0, got_pass = 0, got_rep = 0;
  int   pkts_out = 0;
  bit   rand_ready = 0, rand_gap = 0;
  longint cyc = 0;
  longint last_out_cyc;

  always_ff @(posedge clk) cyc <= cyc + 1;

  // Input monitor: builds the expected output and delay report.
  bit in_first = 1;
  always @(posedge clk) if (rst_n && s_valid && s_ready) begin
    if (in_first) begin
      pkt_t p;
      rep_t r;
      p = in_q.pop_front();
      exp_q.push_back(ref_remove(p));
      if (p.size() >= 24 && p[12] == 8'h88 && p[13] == 8'hB6) begin
        r.carried  = ref_ts(p);
        r.local_ts = timestamp;
        r.due      = cyc + 1;
        rep_q.push_back(r);
        if (p.size() > BEAT_BYTES && ((p.size() - 1) % BEAT_BYTES) + 1 > INT_HDR_BYTES) exp_flush++;
      end else begin
        exp_pass++;
      end
    end
    in_first = s_beat.last;
  end

  // Delay report monitor.
  always @(posedge clk) if (rst_n) begin
    if (delay_valid) begin
      rep_t r;
      got_rep++;
      r = rep_q.pop_front();
      check(cyc == r.due, "delay report one cycle after the first beat");
      check(ts_ingress == r.carried, $sformatf("carried timestamp %h vs %h", ts_ingress, r.carried));
      check(ts_egress == r.local_ts, "local timestamp");
      check(delay == r.local_ts - r.carried, "one-way delay = local - carried");
    end
    if (flush_beat) got_flush++;
    if (passed) got_pass++;
  end

  // Output monitor.
  pkt_t cur;
  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    int n;
    n = 0;
    for (int i = 0; i < BEAT_BYTES; i++) if (m_beat.keep[i]) begin
      cur.push_back(m_beat.data[i]);
      n++;
    end
    check(m_beat.keep == keep_mask(n), "keep mask contiguous");
    if (!m_beat.last) check(n == BEAT_BYTES, "non-last beat full");
    if (m_beat.last) begin
      pkt_t e;
      e = exp_q.pop_front();
      check(same(cur, e), $sformatf("packet %0d bytes (got %0d)", e.size(), cur.size()));
      check(m_beat.size == LEN_WIDTH'(e.size()), "length metadata");
      pkts_out++;
      last_out_cyc = cyc;
      cur = {};
    end
  end

  always @(posedge clk) m_ready <= rand_ready ? ($urandom_range(0, 3) != 0) : 1'b1;

  task automatic send(pkt_t p);
    int nb;
    axis_beat_t bt;
    nb = (p.size() + BEAT_BYTES - 1) / BEAT_BYTES;
    in_q.push_back(p);
    for (int b = 0; b < nb; b++) begin
      bit took;
      while (rand_gap && $urandom_range(0, 3) == 0) begin
        @(negedge clk);
        s_valid = 0;
      end
      bt = '0;
      for (int i = 0; i < BEAT_BYTES; i++)
        if (b * BEAT_BYTES + i < p.size()) bt.data[i] = p[b*BEAT_BYTES+i];
      bt.keep = keep_mask((b == nb - 1) ? p.size() - b * BEAT_BYTES : BEAT_BYTES);
      bt.last = (b == nb - 1);
      bt.size = LEN_WIDTH'(p.size());
      @(negedge clk);
      s_valid = 1;
      s_beat  = bt;
      do begin
        #1 took = s_ready;
        @(posedge clk);
        if (!took) @(negedge clk);
      end while (!took);
    end
  endtask

  task automatic idle();
    @(negedge clk);
    s_valid = 0;
  endtask

  task automatic drain();
    int guard = 0;
    idle();
    while ((exp_q.size() != 0 || in_q.size() != 0) && guard < 2000) begin
      @(posedge clk);
      guard++;
    end
    repeat (3) @(posedge clk);
  endtask

  function automatic logic [63:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pkt_t fr, st;
    s_valid = 0;
    s_beat  = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    ts_set <= 1; ts_base <= 64'd1000;
    @(posedge clk);
    ts_set <= 0;
    repeat (2) @(posedge clk);

    // 1. Stamped sample frame, literal bytes: EtherType 88b6, zero timestamp,
    //    next protocol 0800. The original frame must come out.
    fr = sample_frame();
    st = fr[0:11];
    st = {st, 8'h88, 8'hb6, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h08, 8'h00};
    st = {st, fr[14:$]};
    check(st.size() == 99, "stamped sample frame is 99 bytes");
    send(st);
    drain();
    check(pkts_out == 1 && got_rep == 1, "sample frame out with one report");

    // 2. Same frame with timestamp 0x0000007fd1547f28 carried.
    for (int i = 0; i < 8; i++) st[14+i] = (64'h0000_007f_d154_7f28 >> (56 - 8*i));
    ts_set <= 1; ts_base <= 64'h0000_007f_d154_8000;
    @(posedge clk);
    ts_set <= 0;
    send(st);
    drain();
    check(pkts_out == 2 && got_rep == 2, "second sample frame out");

    // 3. Back-to-back stamped 128-byte frames: 2 beats in, 2 beats out,
    //    one of them the trailing beat, which overlaps the next packet's
    //    held first beat: the input never stalls, 8 beats in 8 cycles.
    begin
      longint t0;
      automatic int n0 = pkts_out;
      t0 = cyc;
      for (int k = 0; k < 4; k++) send(ref_insert(random_frame(118, 16'h0800), rnd64()));
      drain();
      check(pkts_out == n0 + 4, "four packets out");
      // Beats taken at t0+1..t0+8; the last trailing beat leaves at t0+10.
      check(last_out_cyc - t0 == 10, $sformatf("4 packets in 8 cycles (took %0d)", last_out_cyc - t0 - 2));
    end

    // 4. Every stamped length 24..210, interleaved with plain frames and
    //    short frames that carry the INT EtherType but no room for the header.
    rand_gap = 1; rand_ready = 1;
    for (int len = 14; len <= 200; len++) begin
      send(ref_insert(random_frame(len, 16'h0800), rnd64()));
      if (len % 3 == 0) send(random_frame(len, 16'h86DD));
      if (len < 24 && len % 4 == 0) send(random_frame(len, 16'h88B6));
    end
    // 5. Long frames, clock near wrap-around.
    ts_set <= 1; ts_base <= 64'hFFFF_FFFF_FFFF_FF00;
    @(posedge clk);
    ts_set <= 0;
    for (int k = 0; k < 30; k++) begin
      send(ref_insert(random_frame($urandom_range(60, 1518), 16'h0800),
                      64'hFFFF_FFFF_FFFF_FE00 + 64'($urandom_range(0, 511))));
      send(random_frame($urandom_range(60, 1518), 16'h0806));
    end
    drain();
    rand_ready = 0;
    repeat (5) @(posedge clk);

    check(exp_q.size() == 0 && rep_q.size() == 0, "all expected packets and reports seen");
    check(got_flush == exp_flush && exp_flush > 0, $sformatf("trailing-beat strobes %0d vs %0d", got_flush, exp_flush));
    check(got_pass == exp_pass && exp_pass > 0, $sformatf("pass-through strobes %0d vs %0d", got_pass, exp_pass));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
