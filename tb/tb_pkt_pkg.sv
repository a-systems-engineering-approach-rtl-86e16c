// tb_pkt_pkg: frame builder shared by the testbenches.
//
// build_frame() returns an Ethernet II frame (no preamble, no FCS) carrying
// an IPv4 header of 'ihl' 32-bit words (options zero-filled) and a UDP
// header, followed by the payload. Checksums are left zero; lengths are
// filled in.
package tb_pkt_pkg;
  typedef byte unsigned bq_t[$];

  function automatic bq_t build_frame(
      input logic [31:0] src_ip, input logic [31:0] dst_ip,
      input logic [15:0] sport, input logic [15:0] dport,
      input bq_t payload, input int ihl = 5,
      input byte unsigned proto = 8'd17, input logic [15:0] ethertype = 16'h0800);
    bq_t f;
    int ip_len, udp_len;
    ip_len  = ihl * 4 + 8 + payload.size();
    udp_len = 8 + payload.size();
    // MAC addresses
    for (int i = 0; i < 6; i++) f.push_back(8'h02);
    for (int i = 0; i < 6; i++) f.push_back(8'h04);
    f.push_back(ethertype[15:8]); f.push_back(ethertype[7:0]);
    // IPv4 header
    f.push_back({4'd4, 4'(ihl)}); f.push_back(8'h00);
    f.push_back(8'(ip_len >> 8)); f.push_back(8'(ip_len));
    f.push_back(8'h00); f.push_back(8'h01); f.push_back(8'h40); f.push_back(8'h00);
    f.push_back(8'd64); f.push_back(proto); f.push_back(8'h00); f.push_back(8'h00);
    for (int i = 3; i >= 0; i--) f.push_back(8'(src_ip >> (8 * i)));
    for (int i = 3; i >= 0; i--) f.push_back(8'(dst_ip >> (8 * i)));
    for (int i = 5; i <= ihl; i++) if (i < ihl) repeat (4) f.push_back(8'h00);
    // UDP header
    f.push_back(sport[15:8]); f.push_back(sport[7:0]);
    f.push_back(dport[15:8]); f.push_back(dport[7:0]);
    f.push_back(8'(udp_len >> 8)); f.push_back(8'(udp_len));
    f.push_back(8'h00); f.push_back(8'h00);
    foreach (payload[i]) f.push_back(payload[i]);
    return f;
  endfunction

  function automatic bq_t rand_payload(input int n);
    bq_t p;
    // Lower-case letters only: never forms an upper-case signature by chance.
    for (int i = 0; i < n; i++) p.push_back(8'($urandom_range(97, 122)));
    return p;
  endfunction

  function automatic bq_t str_bytes(input string s);
    bq_t p;
    for (int i = 0; i < s.len(); i++) p.push_back(s[i]);
    return p;
  endfunction
endpackage
