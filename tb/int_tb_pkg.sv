// int_tb_pkg: packet helpers shared by the INT testbenches.
//
// Packets are byte queues, byte 0 first on the wire. The package builds the
// sample UDP/IPv4 frame used throughout the checks, random frames, and the
// reference transformations of the INT stages (header insertion and
// removal), written byte by byte and independently of the RTL.
package int_tb_pkg;

  typedef byte unsigned pkt_t[$];

  localparam logic [15:0] TB_INT_ETYPE = 16'h88B6;

  // Sample frame: Ethernet header 11:11:11:11:11:12 <- aa:aa:aa:aa:aa:ab,
  // EtherType IPv4, then a 75-byte IPv4/UDP datagram.
  function automatic pkt_t sample_frame();
    pkt_t p;
    byte unsigned ip[75] = '{
      8'h45,8'h03,8'h00,8'h4b,8'h43,8'h57,8'h00,8'h00,8'h39,8'h11,8'h1d,8'h1f,8'h7c,8'hf6,8'hcd,8'h9c,
      8'hcc,8'h93,8'h0a,8'h03,8'h21,8'h1e,8'h5b,8'h98,8'h00,8'h37,8'haa,8'h9a,8'h6b,8'hfa,8'ha4,8'h95,
      8'hd2,8'h54,8'h47,8'h71,8'h92,8'h29,8'h8b,8'h0f,8'h8d,8'he7,8'he2,8'h99,8'h08,8'hf0,8'h13,8'h0b,
      8'hef,8'h64,8'h07,8'h3b,8'hfe,8'he0,8'hd4,8'h6a,8'had,8'h3f,8'h5b,8'h3e,8'hfd,8'h58,8'h33,8'h49,
      8'hfc,8'h8f,8'h86,8'h00,8'h1c,8'h4f,8'h00,8'ha0,8'hd0,8'h6d,8'h70};
    p = '{8'h11,8'h11,8'h11,8'h11,8'h11,8'h12, 8'haa,8'haa,8'haa,8'haa,8'haa,8'hab, 8'h08,8'h00};
    foreach (ip[i]) p.push_back(ip[i]);
    return p;
  endfunction

  function automatic pkt_t random_frame(int unsigned len, logic [15:0] etype);
    pkt_t p;
    for (int i = 0; i < len; i++) p.push_back(byte'($urandom));
    if (len > 13) begin
      p[12] = etype[15:8];
      p[13] = etype[7:0];
    end
    return p;
  endfunction

  function automatic pkt_t ref_insert(pkt_t p, logic [63:0] ts);
    pkt_t q;
    for (int i = 0; i < 12; i++) q.push_back(p[i]);
    q.push_back(8'h88); q.push_back(8'hB6);
    for (int i = 7; i >= 0; i--) q.push_back(ts[8*i +: 8]);
    q.push_back(p[12]); q.push_back(p[13]);
    for (int i = 14; i < p.size(); i++) q.push_back(p[i]);
    return q;
  endfunction

  function automatic pkt_t ref_remove(pkt_t p);
    pkt_t q;
    if (p.size() < 24 || p[12] != 8'h88 || p[13] != 8'hB6) return p;
    for (int i = 0; i < 12; i++) q.push_back(p[i]);
    q.push_back(p[22]); q.push_back(p[23]);
    for (int i = 24; i < p.size(); i++) q.push_back(p[i]);
    return q;
  endfunction

  function automatic logic [63:0] ref_ts(pkt_t p);
    logic [63:0] t;
    for (int i = 0; i < 8; i++) t[63-8*i -: 8] = p[14+i];
    return t;
  endfunction

  function automatic bit same(pkt_t a, pkt_t b);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] != b[i]) return 0;
    return 1;
  endfunction

endpackage
