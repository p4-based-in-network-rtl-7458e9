// int_telemetry_top: one-way delay measurement with in-band telemetry between
// two P4-programmable FPGA NICs.
//
// The design has two halves that live on different FPGAs and are joined only
// by the network between them:
//   - ingress node: its own timestamp clock and the header-insertion stage.
//     Every packet leaving the ingress node carries its ingress time in a
//     10-byte INT header placed after the Ethernet header.
//   - egress node: its own timestamp clock and the header-removal stage. A
//     stamped packet is timestamped again on arrival, the difference gives the
//     one-way delay, and the packet leaves in its original form so ordinary
//     equipment can forward it.
// The two halves are instantiated side by side with their own clock and
// reset; the ingress output stream (ing_m_*) is meant to reach the egress
// input stream (eg_s_*) through the network. The network, the Ethernet MACs
// and the host interface are outside this design. The delay is only as good
// as the agreement between the two clocks: each clock can be set through its
// load port, which is where a clock-synchronisation agent (PTP) connects.
//
// The two-node arrangement, the header and the delay measurement follow the
// published INT scheme; the separate clock/reset inputs per node, the clock
// load ports and the delay report ports are this design's choices.
//
// Timing: both stages have one register stage on their output; a delay report
// (delay_valid) comes one cycle after the first beat of a stamped packet is
// accepted on the egress side. Stream conventions are those of int_pkg.
module int_telemetry_top
  import int_pkg::*;
(
  // ---------------- ingress node ----------------
  input  logic                ing_clk,
  input  logic                ing_rst_n,
  input  logic                ing_ts_load,
  input  logic [TS_WIDTH-1:0] ing_ts_load_value,
  output logic [TS_WIDTH-1:0] ing_timestamp,
  input  logic                ing_s_valid,      // from the host / local port
  output logic                ing_s_ready,
  input  axis_beat_t          ing_s_beat,
  output logic                ing_m_valid,      // towards the network
  input  logic                ing_m_ready,
  output axis_beat_t          ing_m_beat,
  output logic                ing_inserted,
  output logic                ing_extra_beat,
  // ---------------- egress node ----------------
  input  logic                eg_clk,
  input  logic                eg_rst_n,
  input  logic                eg_ts_load,
  input  logic [TS_WIDTH-1:0] eg_ts_load_value,
  output logic [TS_WIDTH-1:0] eg_timestamp,
  input  logic                eg_s_valid,       // from the network
  output logic                eg_s_ready,
  input  axis_beat_t          eg_s_beat,
  output logic                eg_m_valid,       // towards the next hop / host
  input  logic                eg_m_ready,
  output axis_beat_t          eg_m_beat,
  output logic                delay_valid,
  output logic [TS_WIDTH-1:0] delay,
  output logic [TS_WIDTH-1:0] ts_ingress,
  output logic [TS_WIDTH-1:0] ts_egress,
  output logic                eg_flush_beat,
  output logic                eg_passed
);

  // Ingress node
  int_timestamp_counter #(.TS_WIDTH(TS_WIDTH), .INCREMENT(1)) u_ing_clock (
    .clk        (ing_clk),
    .rst_n      (ing_rst_n),
    .load       (ing_ts_load),
    .load_value (ing_ts_load_value),
    .timestamp  (ing_timestamp)
  );

  int_header_insert u_insert (
    .clk        (ing_clk),
    .rst_n      (ing_rst_n),
    .timestamp  (ing_timestamp),
    .s_valid    (ing_s_valid),
    .s_ready    (ing_s_ready),
    .s_beat     (ing_s_beat),
    .m_valid    (ing_m_valid),
    .m_ready    (ing_m_ready),
    .m_beat     (ing_m_beat),
    .inserted   (ing_inserted),
    .extra_beat (ing_extra_beat)
  );

  // Egress node
  int_timestamp_counter #(.TS_WIDTH(TS_WIDTH), .INCREMENT(1)) u_eg_clock (
    .clk        (eg_clk),
    .rst_n      (eg_rst_n),
    .load       (eg_ts_load),
    .load_value (eg_ts_load_value),
    .timestamp  (eg_timestamp)
  );

  int_header_remove u_remove (
    .clk         (eg_clk),
    .rst_n       (eg_rst_n),
    .timestamp   (eg_timestamp),
    .s_valid     (eg_s_valid),
    .s_ready     (eg_s_ready),
    .s_beat      (eg_s_beat),
    .m_valid     (eg_m_valid),
    .m_ready     (eg_m_ready),
    .m_beat      (eg_m_beat),
    .delay_valid (delay_valid),
    .delay       (delay),
    .ts_ingress  (ts_ingress),
    .ts_egress   (ts_egress),
    .flush_beat  (eg_flush_beat),
    .passed      (eg_passed)
  );

endmodule
