// int_pkg: constants and types shared by the in-band network telemetry (INT)
// datapath.
//
// The INT scheme stamps packets with a 10-byte custom header placed between
// the Ethernet header and the network-layer header: a 64-bit timestamp
// followed by the 16-bit EtherType the packet originally carried. The
// EtherType field itself is overwritten with the experimental value 0x88B6 so
// that the egress node can recognise stamped packets. Header size, field order
// and the EtherType value follow the published format; the stream width and
// the length-metadata width are choices of this design.
//
// Packets travel as an AXI4-Stream-like sequence of beats (axis_beat_t):
// BEAT_BYTES bytes per beat, byte 0 of the frame in data[0] (bits 7:0), a
// per-byte keep mask that is contiguous from byte 0, a last flag and a
// packet-length field (bytes) that is valid on every beat of the packet. All
// beats except the last one of a packet are full.
package int_pkg;

  // 512-bit stream, the width of a typical 100G NIC shell datapath.
  localparam int unsigned BEAT_BYTES    = 64;
  localparam int unsigned ETH_HDR_BYTES = 14;   // dst MAC, src MAC, EtherType
  localparam int unsigned ETYPE_OFFSET  = 12;   // byte offset of the EtherType
  localparam int unsigned TS_WIDTH      = 64;   // timestamp field, bits
  localparam int unsigned TS_BYTES      = TS_WIDTH / 8;
  localparam int unsigned INT_HDR_BYTES = TS_BYTES + 2;  // 10 bytes
  localparam int unsigned LEN_WIDTH     = 16;   // packet-length metadata
  localparam logic [15:0] INT_ETHERTYPE = 16'h88B6;

  // Smallest frame that can hold Ethernet header plus INT header.
  localparam int unsigned INT_MIN_BYTES = ETH_HDR_BYTES + INT_HDR_BYTES;

  localparam int unsigned CNT_WIDTH = $clog2(BEAT_BYTES + 1);

  typedef logic [BEAT_BYTES-1:0][7:0] beat_data_t;
  typedef logic [BEAT_BYTES-1:0]      beat_keep_t;
  typedef logic [CNT_WIDTH-1:0]       beat_cnt_t;

  typedef struct packed {
    beat_data_t            data;
    beat_keep_t            keep;
    logic                  last;
    logic [LEN_WIDTH-1:0]  size;   // whole-packet length in bytes
  } axis_beat_t;

  // Keep mask with the lowest n bytes set.
  function automatic beat_keep_t keep_mask(input int unsigned n);
    beat_keep_t k;
    for (int i = 0; i < BEAT_BYTES; i++) k[i] = (i < n);
    return k;
  endfunction

  // Number of valid bytes in a contiguous keep mask.
  function automatic beat_cnt_t keep_count(input beat_keep_t k);
    beat_cnt_t n;
    n = '0;
    for (int i = 0; i < BEAT_BYTES; i++) n = n + beat_cnt_t'(k[i]);
    return n;
  endfunction

endpackage
