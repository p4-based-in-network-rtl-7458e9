// int_timestamp_counter: the node clock used for INT timestamps.
//
// A free-running cycle counter, TS_WIDTH bits wide, that advances by
// INCREMENT on every clock edge and wraps around. This is the time base the
// INT datapath samples: the ingress stage writes it into the header, the
// egress stage compares it with the carried value to get the one-way delay.
//
// The counter has a load port so that a clock-synchronisation agent (for
// example a PTP client fed from a GPS-disciplined server) can set the time;
// the cycle counter itself follows the published approach, the load port is
// this design's provision for the synchronised clock outlined as future work.
//
// Timing: synchronous reset clears the count to zero. When load is high the next value is
// load_value (load wins over counting); otherwise the next value is
// timestamp + INCREMENT. The output is a register, valid one cycle after a
// load.
module int_timestamp_counter #(
  parameter int unsigned TS_WIDTH  = 64,
  parameter int unsigned INCREMENT = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [TS_WIDTH-1:0] load_value,
  output logic [TS_WIDTH-1:0] timestamp
);

  always_ff @(posedge clk) begin
    if (!rst_n)     timestamp <= '0;
    else if (load)  timestamp <= load_value;
    else            timestamp <= timestamp + TS_WIDTH'(INCREMENT);
  end

endmodule
