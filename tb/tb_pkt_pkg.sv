// tb_pkt_pkg: reference frame builder for the testbenches.
//
// Builds Ethernet frames byte by byte from the protocol definitions (802.3,
// 802.1Q, IPv4 with header checksum, UDP, RTP, ARP) and converts a frame into
// the 64-bit word + ctrl sequence of the NetFPGA data path, module header
// first.  Used to drive receive-side blocks and to predict generated frames.
package tb_pkt_pkg;

  typedef byte unsigned bq_t[$];
  typedef logic [71:0]  wq_t[$];   // {ctrl, data}

  function automatic void put16(ref bq_t q, input logic [15:0] v);
    q.push_back(v[15:8]); q.push_back(v[7:0]);
  endfunction
  function automatic void put32(ref bq_t q, input logic [31:0] v);
    put16(q, v[31:16]); put16(q, v[15:0]);
  endfunction
  function automatic void put48(ref bq_t q, input logic [47:0] v);
    put16(q, v[47:32]); put32(q, v[31:0]);
  endfunction

  function automatic void put_mac(ref bq_t q, input logic [47:0] dst, input logic [47:0] src,
                                  input logic [2:0] cos, input logic [15:0] etype);
    put48(q, dst); put48(q, src);
    if (cos != 0) begin put16(q, 16'h8100); put16(q, {cos, 1'b0, 12'd0}); end
    put16(q, etype);
  endfunction

  // One's-complement checksum of the 20 IPv4 header bytes starting at q[off].
  function automatic logic [15:0] ip_csum(const ref bq_t q, input int off);
    int unsigned s = 0;
    for (int i = 0; i < 20; i += 2) s += 32'({q[off+i], q[off+i+1]});
    while (s > 32'hFFFF) s = (s & 32'hFFFF) + (s >> 16);
    return ~s[15:0];
  endfunction

  function automatic bq_t udp_frame(input logic [47:0] dmac, input logic [47:0] smac,
      input logic [2:0] cos, input logic [7:0] tos, input logic [31:0] sip, input logic [31:0] dip,
      input logic [15:0] sport, input logic [15:0] dport, input bit rtp, input logic [6:0] pt,
      input logic [15:0] rseq, input logic [31:0] rts, input int plen, input logic [31:0] pword);
    bq_t q;
    int ipoff;
    logic [15:0] cs;
    int extra = rtp ? 12 : 0;
    put_mac(q, dmac, smac, cos, 16'h0800);
    ipoff = q.size();
    q.push_back(8'h45); q.push_back(tos); put16(q, 16'(28 + extra + plen));
    put16(q, 0); put16(q, 0); q.push_back(8'd255); q.push_back(8'd17); put16(q, 0);
    put32(q, sip); put32(q, dip);
    cs = ip_csum(q, ipoff);
    q[ipoff+10] = cs[15:8]; q[ipoff+11] = cs[7:0];
    put16(q, sport); put16(q, dport); put16(q, 16'(8 + extra + plen)); put16(q, 0);
    if (rtp) begin
      q.push_back(8'h80); q.push_back({1'b0, pt}); put16(q, rseq); put32(q, rts); put32(q, 32'hAD0F01AD);
    end
    for (int i = 0; i < plen; i++) q.push_back(pword[31 - 8*(i%4) -: 8]);
    return q;
  endfunction

  function automatic bq_t arp_frame(input logic [47:0] edst, input logic [47:0] smac,
      input logic [2:0] cos, input logic [15:0] oper, input logic [47:0] sha, input logic [31:0] spa,
      input logic [47:0] tha, input logic [31:0] tpa, input int pad_to);
    bq_t q;
    put_mac(q, edst, smac, cos, 16'h0806);
    put16(q, 1); put16(q, 16'h0800); q.push_back(6); q.push_back(4); put16(q, oper);
    put48(q, sha); put32(q, spa); put48(q, tha); put32(q, tpa);
    while (q.size() < pad_to) q.push_back(0);
    return q;
  endfunction

  function automatic logic [63:0] mod_hdr(input logic [15:0] dst, input logic [15:0] src, input int nbytes);
    return {dst, 16'((nbytes + 7) / 8), src, 16'(nbytes)};
  endfunction

  function automatic wq_t to_words(input logic [15:0] dst, input logic [15:0] src, const ref bq_t q);
    wq_t w;
    int n = q.size();
    w.push_back({8'hFF, mod_hdr(dst, src, n)});
    for (int i = 0; i < n; i += 8) begin
      logic [63:0] d = '0;
      int v = (n - i >= 8) ? 8 : n - i;
      for (int k = 0; k < v; k++) d[63 - 8*k -: 8] = q[i+k];
      w.push_back({(i + 8 >= n) ? 8'(1 << (v - 1)) : 8'h00, d});
    end
    return w;
  endfunction

endpackage
