// int_header_insert_tb: self-checking test of the ingress INT stage.
//
// Sends the sample frame with a zero timestamp and with a non-zero one and
// compares the stamped bytes with literal expected values, then sends random
// frames of many lengths (including every length around the beat boundaries
// where the extra beat appears) under random input gaps and random output
// back-pressure, and compares each output packet with a byte-level reference
// of the insertion. Also checks the length metadata, the one-cycle latency,
// full throughput for back-to-back traffic and the event strobes.
`timescale 1ns/1ps
module int_header_insert_tb;
  import int_pkg::*;
  import int_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;

  logic [63:0] timestamp;
  logic s_valid, s_ready, m_valid, m_ready;
  axis_beat_t s_beat, m_beat;
  logic inserted, extra_beat;

  int checks = 0, failures = 0;

  int_header_insert dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Test clock: counts cycles, can be preset.
  logic [63:0] ts_base = 64'd0;
  logic        ts_set  = 1'b0;
  always_ff @(posedge clk) timestamp <= ts_set ? ts_base : timestamp + 1;

  pkt_t in_q[$];
  pkt_t exp_q[$];
  int   exp_extra = 0, got_extra = 0, got_inserted = 0, pkts_out = 0;
  bit   rand_ready = 0, rand_gap = 0;
  longint cyc = 0;
  longint first_in_cyc[$];
  longint last_out_cyc;

  always_ff @(posedge clk) cyc <= cyc + 1;

  // Input monitor: a packet's ingress time is the cycle its first beat is taken.
  bit in_first = 1;
  always @(posedge clk) if (rst_n && s_valid && s_ready) begin
    if (in_first) begin
      pkt_t p;
      p = in_q.pop_front();
      exp_q.push_back(ref_insert(p, timestamp));
      if ((p.size() + 9) / BEAT_BYTES != (p.size() - 1) / BEAT_BYTES) exp_extra++;
      first_in_cyc.push_back(cyc);
    end
    in_first = s_beat.last;
  end

  // Expected first bytes of the stamped sample frame: with a zero clock, and
  // (from the EtherType on) with the clock at 0x0000007fd1547f28.
  byte unsigned lit0[26] = '{8'h11,8'h11,8'h11,8'h11,8'h11,8'h12,8'haa,8'haa,8'haa,8'haa,8'haa,8'hab,
                             8'h88,8'hb6,8'h00,8'h00,8'h00,8'h00,8'h00,8'h00,8'h00,8'h00,8'h08,8'h00,8'h45,8'h03};
  byte unsigned lit1[16] = '{8'h88,8'hb6,8'h00,8'h00,8'h00,8'h7f,8'hd1,8'h54,8'h7f,8'h28,8'h08,8'h00,8'h45,8'h03,8'h00,8'h4b};

  // Output monitor.
  pkt_t cur;
  bit out_first = 1;
  always @(posedge clk) if (rst_n) begin
    if (inserted) got_inserted++;
    if (extra_beat) got_extra++;
    if (m_valid && m_ready) begin
      int n;
      n = 0;
      if (out_first) begin
        longint c;
        c = first_in_cyc.pop_front();
        if (!rand_ready) check(cyc == c + 1, $sformatf("first output beat %0d cycles after input", cyc - c));
        if (pkts_out == 0) begin
          bit ok;
          ok = 1;
          foreach (lit0[i]) if (m_beat.data[i] != lit0[i]) ok = 0;
          check(ok, "stamped sample frame, zero timestamp");
          check(m_beat.size == 16'd99, "sample frame length 89 -> 99");
        end
        if (pkts_out == 1) begin
          bit ok;
          ok = 1;
          foreach (lit1[i]) if (m_beat.data[12+i] != lit1[i]) ok = 0;
          check(ok, "stamped sample frame, timestamp 0x7fd1547f28");
        end
      end
      for (int i = 0; i < BEAT_BYTES; i++) if (m_beat.keep[i]) begin
        cur.push_back(m_beat.data[i]);
        n++;
      end
      check(m_beat.keep == keep_mask(n), "keep mask contiguous");
      if (!m_beat.last) check(n == BEAT_BYTES, "non-last beat full");
      out_first = m_beat.last;
      if (m_beat.last) begin
        pkt_t e;
        e = exp_q.pop_front();
        check(same(cur, e), $sformatf("packet %0d bytes (got %0d)", e.size(), cur.size()));
        check(m_beat.size == LEN_WIDTH'(e.size()), "length metadata +10");
        pkts_out++;
        last_out_cyc = cyc;
        cur = {};
      end
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
      // Drive on the falling edge; the beat is taken at the next rising
      // edge if s_ready is high just before it.
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

  // Ends the current burst: the valid line drops before the next clock edge.
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

  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pkt_t fr;
    s_valid = 0;
    s_beat  = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    ts_set <= 1; ts_base <= 64'd0;
    @(posedge clk);
    ts_set <= 0;
    @(posedge clk);

    // 1. Sample frame with the clock held at zero: literal stamped bytes.
    fr = sample_frame();
    ts_set <= 1; ts_base <= 64'd0;
    @(posedge clk);
    send(fr);
    ts_set <= 0;
    drain();
    check(pkts_out == 1, "sample frame came out");

    // 2. Sample frame stamped with a non-zero time.
    ts_set <= 1; ts_base <= 64'h0000_007f_d154_7f28;
    @(posedge clk);
    send(sample_frame());
    ts_set <= 0;
    drain();

    // 3. Back-to-back full-rate traffic: 4 packets of 2 beats (118 bytes,
    //    no extra beat) must leave in 8 consecutive cycles.
    begin
      longint t0;
      automatic int n0 = pkts_out;
      t0 = cyc;
      for (int k = 0; k < 4; k++) send(random_frame(118, 16'h0800));
      drain();
      check(pkts_out == n0 + 4, "four packets out");
      // First beat taken at t0+1, leaves at t0+2; the eighth leaves at t0+9.
      check(last_out_cyc - t0 == 9, $sformatf("8 beats in 8 cycles (took %0d)", last_out_cyc - t0 - 1));
    end

    // 4. Every length from 14 to 200 bytes, random gaps and back-pressure.
    rand_gap = 1; rand_ready = 1;
    for (int len = 14; len <= 200; len++) send(random_frame(len, 16'(len)));
    // 5. Longer random frames up to 1518 bytes.
    for (int k = 0; k < 30; k++) send(random_frame($urandom_range(60, 1518), 16'h86DD));
    drain();
    rand_ready = 0;
    repeat (5) @(posedge clk);

    check(exp_q.size() == 0, "all expected packets seen");
    check(got_inserted == pkts_out, $sformatf("inserted strobes %0d vs packets %0d", got_inserted, pkts_out));
    check(got_extra == exp_extra && exp_extra > 0, $sformatf("extra-beat strobes %0d vs %0d", got_extra, exp_extra));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
