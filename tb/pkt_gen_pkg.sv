// pkt_gen_pkg: test-side builder of Ethernet frames carrying IPv4/TCP/UDP
// headers, and their split into 64-bit words (first byte in bits 63:56).
package pkt_gen_pkg;
  import dfa_pkg::*;

  typedef byte unsigned bytes_t[$];

  // Build a frame. ihl in 32-bit words (5..15); non-IPv4 frames get
  // ethertype 0x86dd. The frame is padded to at least 60 bytes.
  function automatic bytes_t build_frame(tuple_t t, bit ipv4, int unsigned ihl,
                                         int unsigned payload);
    bytes_t b;
    int unsigned totlen;
    for (int i = 0; i < 12; i++) b.push_back(8'($urandom));
    if (ipv4) begin b.push_back(8'h08); b.push_back(8'h00); end
    else      begin b.push_back(8'h86); b.push_back(8'hdd); end
    totlen = 4 * ihl + 8 + payload;
    b.push_back(8'h40 | 8'(ihl));
    b.push_back(8'h00);
    b.push_back(8'(totlen >> 8)); b.push_back(8'(totlen));
    for (int i = 0; i < 5; i++) b.push_back(8'($urandom));   // id, flags, ttl
    b.push_back(t.proto);
    b.push_back(8'($urandom)); b.push_back(8'($urandom));   // checksum
    for (int i = 3; i >= 0; i--) b.push_back(t.src_ip[8*i +: 8]);
    for (int i = 3; i >= 0; i--) b.push_back(t.dst_ip[8*i +: 8]);
    for (int i = 5; i < ihl; i++) for (int k = 0; k < 4; k++) b.push_back(8'($urandom));
    b.push_back(t.src_port[15:8]); b.push_back(t.src_port[7:0]);
    b.push_back(t.dst_port[15:8]); b.push_back(t.dst_port[7:0]);
    for (int i = 0; i < 4 + payload; i++) b.push_back(8'($urandom));
    while (b.size() < 60) b.push_back(8'h00);
    return b;
  endfunction

  // The tuple the classifier should extract from a frame built as above.
  function automatic tuple_t expected_tuple(tuple_t t);
    tuple_t e;
    e = t;
    if (!(t.proto == 8'd6 || t.proto == 8'd17)) begin
      e.src_port = '0;
      e.dst_port = '0;
    end
    return e;
  endfunction

  function automatic int unsigned nwords(bytes_t b);
    return (b.size() + 7) / 8;
  endfunction

  function automatic logic [63:0] word(bytes_t b, int unsigned w);
    logic [63:0] d;
    d = '0;
    for (int j = 0; j < 8; j++)
      if (8 * w + j < b.size()) d[63 - 8*j -: 8] = b[8 * w + j];
    return d;
  endfunction

  function automatic logic [2:0] last_bytes(bytes_t b);
    return 3'(b.size() % 8);
  endfunction
endpackage
