// tb_netcon_pkg: packet builders shared by the testbenches.
//
// make_ip_udp builds an IPv4 packet carrying UDP: an IP header of ihl 32-bit
// words (version 4, protocol 17, the rest filler), an 8-byte UDP header
// whose length field covers the payload, and the payload. eth_wrap puts a
// 14-byte Ethernet II header in front. slip_encode applies SLIP escaping
// (END -> ESC ESC_END, ESC -> ESC ESC_ESC) and appends END. The values are
// worked out here, independently of the design.
package tb_netcon_pkg;
  typedef logic [7:0] bytes_t[$];

  localparam logic [63:0] GOOD_KEY = "REBOOTPC";

  function automatic bytes_t key_bytes(input logic [63:0] key);
    bytes_t q;
    for (int i = 7; i >= 0; i--) q.push_back(key[8*i +: 8]);
    return q;
  endfunction

  function automatic bytes_t make_ip_udp(input bytes_t payload, input int ihl);
    bytes_t q;
    int ulen = 8 + payload.size();
    int tlen = 4 * ihl + ulen;
    q.push_back(8'h40 | 8'(ihl));
    q.push_back(8'h00);
    q.push_back(8'(tlen >> 8)); q.push_back(8'(tlen));
    for (int i = 4; i < 4 * ihl; i++) q.push_back(i == 9 ? 8'd17 : 8'(8'hA0 + i));
    q.push_back(8'h04); q.push_back(8'hD2);           // source port
    q.push_back(8'h1F); q.push_back(8'h90);           // destination port
    q.push_back(8'(ulen >> 8)); q.push_back(8'(ulen));
    q.push_back(8'h00); q.push_back(8'h00);           // checksum unused
    foreach (payload[i]) q.push_back(payload[i]);
    return q;
  endfunction

  function automatic bytes_t eth_wrap(input bytes_t ip);
    bytes_t q;
    for (int i = 0; i < 12; i++) q.push_back(8'(8'h10 + i));   // MAC addresses
    q.push_back(8'h08); q.push_back(8'h00);                  // IPv4
    foreach (ip[i]) q.push_back(ip[i]);
    return q;
  endfunction

  function automatic bytes_t slip_encode(input bytes_t p);
    bytes_t q;
    foreach (p[i]) begin
      if (p[i] == 8'hC0) begin q.push_back(8'hDB); q.push_back(8'hDC); end
      else if (p[i] == 8'hDB) begin q.push_back(8'hDB); q.push_back(8'hDD); end
      else q.push_back(p[i]);
    end
    q.push_back(8'hC0);
    return q;
  endfunction
endpackage
