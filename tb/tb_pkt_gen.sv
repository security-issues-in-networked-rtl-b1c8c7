// tb_pkt_gen: builds test packets as they appear on the internal stream:
// a header word, then an Ethernet II frame carrying IPv4. Fields the tests
// use: IPv4 protocol, source and destination address, TTL (byte 30 of the
// stream) and a 32-bit marker at byte 56 that the core model reacts to.
package tb_pkt_gen;

  typedef logic [63:0] pkt_t[$];

  function automatic void put_byte(ref pkt_t p, input int b, input logic [7:0] v);
    p[b / 8][63 - 8 * (b % 8) -: 8] = v;
  endfunction

  function automatic logic [7:0] get_byte(pkt_t p, int b);
    return p[b / 8][63 - 8 * (b % 8) -: 8];
  endfunction

  function automatic pkt_t make_pkt(int nwords, logic [7:0] ttl, logic [7:0] proto,
                                    logic [31:0] src, logic [31:0] dst,
                                    logic [31:0] marker, int id);
    pkt_t p;
    for (int w = 0; w < nwords; w++) p.push_back({32'hC0DE_0000 | 32'(id), 32'(w) * 32'h0101_0101});
    p[0] = 64'h0;
    put_byte(p, 8 + 12, 8'h08); put_byte(p, 8 + 13, 8'h00);    // ethertype IPv4
    put_byte(p, 8 + 14, 8'h45);
    put_byte(p, 8 + 22, ttl);
    put_byte(p, 8 + 23, proto);
    for (int i = 0; i < 4; i++) begin
      put_byte(p, 8 + 26 + i, src[31 - 8 * i -: 8]);
      put_byte(p, 8 + 30 + i, dst[31 - 8 * i -: 8]);
      put_byte(p, 56 + i, marker[31 - 8 * i -: 8]);
    end
    return p;
  endfunction

endpackage
