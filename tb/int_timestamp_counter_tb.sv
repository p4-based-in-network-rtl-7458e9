// int_timestamp_counter_tb: self-checking test of the node clock.
//
// Checks the reset value, counting by one per cycle over a long run, a load
// (which wins over counting and is visible one cycle later), wrap-around at
// 2^64, and a second instance with INCREMENT = 4 (a clock that advances by
// the period of a slower counter). Expected values come from a cycle count
// kept by the testbench.
module int_timestamp_counter_tb;

  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;

  logic        load;
  logic [63:0] load_value, ts, ts4;

  int checks = 0, failures = 0;

  int_timestamp_counter dut (
    .clk, .rst_n, .load, .load_value, .timestamp(ts)
  );
  int_timestamp_counter #(.TS_WIDTH(64), .INCREMENT(4)) dut4 (
    .clk, .rst_n, .load, .load_value, .timestamp(ts4)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] ref1, ref4;
    load = 0;
    load_value = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(ts == 0 && ts4 == 0, "reset value zero");
    rst_n = 1;
    ref1 = 0;
    ref4 = 0;
    // free running
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      ref1 += 1;
      ref4 += 4;
      check(ts == ref1, $sformatf("count %0d vs %0d", ts, ref1));
      check(ts4 == ref4, "count by 4");
    end
    // load near the wrap point
    load = 1;
    load_value = 64'hFFFF_FFFF_FFFF_FFFA;
    @(negedge clk);
    load = 0;
    check(ts == 64'hFFFF_FFFF_FFFF_FFFA && ts4 == 64'hFFFF_FFFF_FFFF_FFFA, "loaded value");
    ref1 = 64'hFFFF_FFFF_FFFF_FFFA;
    ref4 = ref1;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      ref1 += 1;
      ref4 += 4;
      check(ts == ref1, "count through wrap");
      check(ts4 == ref4, "count by 4 through wrap");
    end
    check(ts == 64'd14, "wrapped to 14");
    // load held high: value stays at the load value
    load = 1;
    load_value = 64'h0000_007f_d154_7f28;
    repeat (3) begin
      @(negedge clk);
      check(ts == 64'h0000_007f_d154_7f28, "load held");
    end
    load = 0;
    @(negedge clk);
    check(ts == 64'h0000_007f_d154_7f29, "counts on after load");
    // synchronous reset
    rst_n = 0;
    @(negedge clk);
    check(ts == 0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
