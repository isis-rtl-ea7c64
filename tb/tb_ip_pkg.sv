// tb_ip_pkg: helpers shared by the testbenches: building IPv4 packets with
// a correct header checksum, and the reference checksum itself.
package tb_ip_pkg;

  typedef logic [7:0] bytes_t[$];

  // One's complement sum of the 20-byte header, folded, inverted.
  function automatic logic [15:0] hdr_checksum(input bytes_t p);
    int unsigned s = 0;
    for (int k = 0; k < 20; k += 2)
      if (k != 10) s += {p[k], p[k+1]};
    while (s >> 16) s = (s & 16'hFFFF) + (s >> 16);
    return ~s[15:0];
  endfunction

  // IPv4 packet of len bytes (len >= 20): header with the given TOS, TTL
  // and destination, then payload bytes derived from tag so that every
  // packet is distinct.
  function automatic bytes_t make_ip(input int len, input logic [31:0] dst,
                                     input logic [7:0] ttl, input logic [7:0] tos,
                                     input int unsigned tag);
    bytes_t p;
    logic [15:0] c;
    p = {};
    for (int k = 0; k < len; k++) p.push_back(8'(tag * 7 + k * 13 + (k >> 8)));
    p[0] = 8'h45; p[1] = tos;
    p[2] = 8'(len >> 8); p[3] = 8'(len);
    p[4] = 8'(tag >> 8); p[5] = 8'(tag);         // identification = tag
    p[6] = 8'h00; p[7] = 8'h00;
    p[8] = ttl; p[9] = 8'd17;
    p[12] = 8'd10; p[13] = 8'd0; p[14] = 8'd0; p[15] = 8'd1;
    p[16] = dst[31:24]; p[17] = dst[23:16]; p[18] = dst[15:8]; p[19] = dst[7:0];
    c = hdr_checksum(p);
    p[10] = c[15:8]; p[11] = c[7:0];
    return p;
  endfunction

  // The packet as a router forwards it: TTL one less, checksum recomputed.
  function automatic bytes_t forwarded(input bytes_t p);
    bytes_t q;
    logic [15:0] c;
    q = p;
    q[8] = p[8] - 8'd1;
    c = hdr_checksum(q);
    q[10] = c[15:8]; q[11] = c[7:0];
    return q;
  endfunction

endpackage
