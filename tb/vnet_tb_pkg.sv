// vnet_tb_pkg: frame construction and reference field extraction for the
// testbenches. Frames are built byte by byte (so the expected values do not
// reuse the RTL's word-slicing helpers) and packed big-endian into 64-bit words.
package vnet_tb_pkg;

  typedef logic [7:0]  byte_q [$];
  typedef logic [63:0] word_q [$];

  function automatic void put(ref byte_q b, input int off, input int n, input logic [63:0] v);
    for (int i = 0; i < n; i++) b[off + i] = v[8*(n-1-i) +: 8];
  endfunction

  function automatic logic [63:0] get(input byte_q b, input int off, input int n);
    logic [63:0] v = '0;
    for (int i = 0; i < n; i++) v = {v[55:0], b[off + i]};
    return v;
  endfunction

  // One's-complement checksum of the outer IPv4 header at bytes 14..33.
  function automatic logic [15:0] ref_csum(input byte_q b);
    int unsigned s = 0;
    for (int i = 14; i < 34; i += 2)
      if (i != 24) s += {b[i], b[i+1]};
    while (s > 32'hFFFF) s = (s & 32'hFFFF) + (s >> 16);
    return ~s[15:0];
  endfunction

  // IPIP-tunnelled frame of nwords 64-bit words (>= 7).
  function automatic byte_q mk_ipip(input logic [47:0] dmac, input logic [47:0] smac,
                                    input logic [31:0] sip, input logic [31:0] dip,
                                    input logic [31:0] vsip, input logic [31:0] vip,
                                    input int nwords, input int seed);
    byte_q b;
    for (int i = 0; i < 8 * nwords; i++) b.push_back(8'(seed + 7 * i));
    put(b, 0, 6, dmac);
    put(b, 6, 6, smac);
    put(b, 12, 2, 16'h0800);
    put(b, 14, 2, 16'h4500);
    put(b, 16, 2, 16'(8 * nwords - 14));
    put(b, 18, 2, 16'(seed));
    put(b, 20, 2, 16'h0000);
    put(b, 22, 2, 16'h4004);          // TTL 64, protocol 4 (IP in IP)
    put(b, 26, 4, sip);
    put(b, 30, 4, dip);
    put(b, 24, 2, ref_csum(b));
    put(b, 34, 2, 16'h4500);
    put(b, 46, 4, vsip);
    put(b, 50, 4, vip);
    return b;
  endfunction

  function automatic word_q to_words(input byte_q b);
    word_q w;
    for (int i = 0; i < b.size(); i += 8) w.push_back(get(b, i, 8));
    return w;
  endfunction

  function automatic byte_q to_bytes(input word_q w);
    byte_q b;
    foreach (w[i]) for (int k = 7; k >= 0; k--) b.push_back(w[i][8*k +: 8]);
    return b;
  endfunction

endpackage
