// int_telemetry_top_tb: end-to-end test of the two-node INT measurement.
//
// The ingress node's network output is joined to the egress node's network
// input through a link model: a FIFO that holds every beat for LINK_CYCLES
// cycles (the propagation delay) and can hold back beats (congestion). Both
// nodes run from the same oscillator here, so their clocks only disagree by
// what is loaded into them.
//
// Phases:
//   1. clocks synchronised (both loaded with the same time): the sample
//      frame and random frames cross; every frame must come out of the egress
//      node exactly as it entered the ingress node, and every reported delay
//      must equal the fixed path latency LINK_CYCLES + 1 (ingress output
//      register) for frames that do not queue behind each other;
//   2. clocks offset by a known amount (an unsynchronised node): reported
//      delay = path latency + offset;
//   3. random gaps, link congestion and egress back-pressure, frames of all
//      sizes, plus plain frames injected into the link by a node without INT
//      support, which the egress node must pass untouched.
// Every report is also compared with testbench reference clocks. Each
// mechanism (insertion, extra beat on insertion, delay report, trailing beat
// on removal, a trailing beat overlapped with the next packet's first beat,
// pass-through, back-pressure stalls, clock load) is counted and must occur at
// least once.
module int_telemetry_top_tb;
  import int_pkg::*;
  import int_tb_pkg::*;

  localparam int LINK_CYCLES = 20;

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

  // Reference clocks of the two nodes.
  logic [63:0] ing_ref = 0, eg_ref = 0;
  always @(posedge clk) begin
    ing_ref <= ing_ts_load ? ing_ts_load_value : ing_ref + 1;
    eg_ref  <= eg_ts_load  ? eg_ts_load_value  : eg_ref + 1;
  end

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Mechanism counters.
  int n_insert = 0, n_extra = 0, n_report = 0, n_flush = 0, n_pass = 0;
  int n_ing_stall = 0, n_load = 0, n_eg_stall = 0, n_overlap = 0;

  // ---------------- link model ----------------
  typedef struct {
    axis_beat_t beat;
    longint     due;
  } link_t;
  link_t link_q[$];
  bit    link_congest = 0;   // randomly refuse beats from the ingress node
  bit    inject_busy  = 0;

  always @(posedge clk) ing_m_ready <= link_congest ? ($urandom_range(0, 2) != 0) : 1'b1;

  always @(posedge clk) if (rst_n && ing_m_valid && ing_m_ready) begin
    link_t l;
    l.beat = ing_m_beat;
    l.due  = cyc + LINK_CYCLES;
    link_q.push_back(l);
  end

  // Drive the egress input on the falling edge from the head of the link.
  always @(negedge clk) begin
    if (eg_s_valid && eg_s_ready_at_edge) void'(link_q.pop_front());
    if (link_q.size() != 0 && link_q[0].due <= cyc) begin
      eg_s_valid = 1;
      eg_s_beat  = link_q[0].beat;
    end else begin
      eg_s_valid = 0;
    end
  end
  logic eg_s_ready_at_edge;
  always @(posedge clk) eg_s_ready_at_edge <= eg_s_valid && eg_s_ready;

  // ---------------- scoreboard ----------------
  pkt_t   in_q[$];        // frames handed to the ingress driver
  pkt_t   exp_q[$];       // frames expected at the egress output, in order
  logic [63:0] ing_time_q[$];
  longint expect_delay = -1;   // fixed delay expected, -1 = do not check
  bit     pass_pending[$];     // per expected frame: 1 = plain, bypassed INT

  bit ing_first = 1;
  always @(posedge clk) if (rst_n) begin
    if (ing_s_valid && !ing_s_ready) n_ing_stall++;
    if (ing_s_valid && ing_s_ready) begin
      if (ing_first) begin
        exp_q.push_back(in_q.pop_front());
        ing_time_q.push_back(ing_ref);
      end
      ing_first = ing_s_beat.last;
    end
    if (eg_m_valid && !eg_m_ready) n_eg_stall++;
    if (ing_inserted) n_insert++;
    if (ing_extra_beat) n_extra++;
    if (eg_flush_beat) n_flush++;
    // trailing beat of one packet leaving while the next one's first beat is taken
    if (eg_flush_beat && eg_s_valid && eg_s_ready) n_overlap++;
    if (eg_passed) n_pass++;
    if (ing_ts_load || eg_ts_load) n_load++;
  end

  // Local arrival time at the egress node, taken at the first beat.
  logic [63:0] eg_time_q[$];
  bit eg_first = 1;
  always @(posedge clk) if (rst_n && eg_s_valid && eg_s_ready) begin
    if (eg_first && eg_s_beat.data[12] == 8'h88 && eg_s_beat.data[13] == 8'hB6)
      eg_time_q.push_back(eg_ref);
    eg_first = eg_s_beat.last;
  end

  always @(posedge clk) if (rst_n && delay_valid) begin
    logic [63:0] ti, te;
    n_report++;
    ti = ing_time_q.pop_front();
    te = eg_time_q.pop_front();
    check(ts_ingress == ti, $sformatf("carried time %0d vs %0d", ts_ingress, ti));
    check(ts_egress == te, "egress arrival time");
    check(delay == te - ti, "delay = arrival - ingress time");
    if (expect_delay >= 0)
      check(delay == 64'(expect_delay), $sformatf("delay %0d, expected %0d", delay, expect_delay));
  end

  pkt_t cur;
  int   pkts_out = 0;
  always @(posedge clk) if (rst_n && eg_m_valid && eg_m_ready) begin
    for (int i = 0; i < BEAT_BYTES; i++) if (eg_m_beat.keep[i]) cur.push_back(eg_m_beat.data[i]);
    if (eg_m_beat.last) begin
      pkt_t e;
      e = exp_q.pop_front();
      check(same(cur, e), $sformatf("frame of %0d bytes out unchanged (got %0d)", e.size(), cur.size()));
      check(eg_m_beat.size == LEN_WIDTH'(e.size()), "length metadata restored");
      pkts_out++;
      cur = {};
    end
  end

  bit eg_backpressure = 0;
  always @(posedge clk) eg_m_ready <= eg_backpressure ? ($urandom_range(0, 3) != 0) : 1'b1;

  // ---------------- drivers ----------------
  bit rand_gap = 0;

  task automatic send(pkt_t p);
    int nb;
    axis_beat_t bt;
    nb = (p.size() + BEAT_BYTES - 1) / BEAT_BYTES;
    in_q.push_back(p);
    for (int b = 0; b < nb; b++) begin
      bit took;
      while (rand_gap && $urandom_range(0, 3) == 0) begin
        @(negedge clk);
        ing_s_valid = 0;
      end
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
  endtask

  task automatic idle();
    @(negedge clk);
    ing_s_valid = 0;
  endtask

  task automatic drain();
    int guard = 0;
    idle();
    while ((exp_q.size() != 0 || in_q.size() != 0 || link_q.size() != 0) && guard < 5000) begin
      @(posedge clk);
      guard++;
    end
    check(guard < 5000, "traffic drained");
    repeat (3) @(posedge clk);
  endtask

  // A frame from a node without INT support enters the link directly.
  task automatic inject_plain(pkt_t p);
    int nb;
    nb = (p.size() + BEAT_BYTES - 1) / BEAT_BYTES;
    @(posedge clk);
    exp_q.push_back(p);
    for (int b = 0; b < nb; b++) begin
      link_t l;
      l.beat = '0;
      for (int i = 0; i < BEAT_BYTES; i++)
        if (b * BEAT_BYTES + i < p.size()) l.beat.data[i] = p[b*BEAT_BYTES+i];
      l.beat.keep = keep_mask((b == nb - 1) ? p.size() - b * BEAT_BYTES : BEAT_BYTES);
      l.beat.last = (b == nb - 1);
      l.beat.size = LEN_WIDTH'(p.size());
      l.due = cyc + LINK_CYCLES;
      link_q.push_back(l);
    end
  endtask

  task automatic load_clocks(logic [63:0] ti, logic [63:0] te);
    @(negedge clk);
    ing_ts_load = 1; ing_ts_load_value = ti;
    eg_ts_load  = 1; eg_ts_load_value  = te;
    @(negedge clk);
    ing_ts_load = 0;
    eg_ts_load  = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r0;
    ing_s_valid = 0;
    ing_s_beat  = '0;
    eg_s_valid  = 0;
    eg_s_beat   = '0;
    repeat (4) @(posedge clk);
    rst_n <= 1;

    // 1. Synchronised clocks.
    load_clocks(64'h0000_007f_d154_7f28, 64'h0000_007f_d154_7f28);
    expect_delay = LINK_CYCLES + 1;
    // Frames are spaced out so that none waits behind another.
    send(sample_frame());
    drain();
    for (int k = 0; k < 8; k++) begin
      send(random_frame($urandom_range(60, 300), 16'h0800));
      drain();
    end
    check(n_report == 9, $sformatf("nine delay reports (%0d)", n_report));

    // 2. Egress clock 5000 cycles ahead.
    load_clocks(64'd1_000_000, 64'd1_005_000);
    expect_delay = LINK_CYCLES + 1 + 5000;
    r0 = n_report;
    for (int k = 0; k < 8; k++) begin
      send(random_frame($urandom_range(60, 300), 16'h0800));
      drain();
    end
    check(n_report == r0 + 8, "eight more delay reports");

    // 3. Stress: gaps, congestion, back-pressure, plain frames, all sizes.
    expect_delay = -1;
    rand_gap = 1; link_congest = 1; eg_backpressure = 1;
    for (int len = 14; len <= 160; len++) begin
      send(random_frame(len, 16'h0800));
      if (len % 16 == 0) begin
        drain();
        inject_plain(random_frame(len + 40, 16'h0806));
      end
    end
    for (int k = 0; k < 20; k++) send(random_frame($urandom_range(60, 1518), 16'h86DD));
    drain();
    link_congest = 0; eg_backpressure = 0;
    repeat (5) @(posedge clk);

    check(exp_q.size() == 0 && ing_time_q.size() == 0 && eg_time_q.size() == 0, "nothing left over");
    check(n_report == n_insert, $sformatf("one report per stamped frame (%0d/%0d)", n_report, n_insert));
    check(n_insert > 0,    $sformatf("header insertions: %0d", n_insert));
    check(n_extra > 0,     $sformatf("extra beats on insertion: %0d", n_extra));
    check(n_report > 0,    $sformatf("delay reports: %0d", n_report));
    check(n_flush > 0,     $sformatf("trailing beats on removal: %0d", n_flush));
    check(n_pass > 0,      $sformatf("plain frames passed: %0d", n_pass));
    check(n_ing_stall > 0, $sformatf("ingress input stalls: %0d", n_ing_stall));
    check(n_eg_stall > 0,  $sformatf("egress output stalls: %0d", n_eg_stall));
    check(n_load > 0,      $sformatf("clock loads: %0d", n_load));
    check(n_overlap > 0,   $sformatf("trailing beat overlapped with next first beat: %0d", n_overlap));
    $display("frames out %0d, reports %0d, extra %0d, flush %0d (overlapped %0d), plain %0d, stalls %0d/%0d",
             pkts_out, n_report, n_extra, n_flush, n_overlap, n_pass, n_ing_stall, n_eg_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
