// yasir_ref_pkg: behavioural reference models used by the testbenches.
//
// Written independently of the RTL, as plain sequential code on byte queues:
// SHA-1 and HMAC-SHA-1 (FIPS 180 / RFC 2104), AES-128 encryption with an S-box
// generated by the textbook log/antilog walk (not the RTL's x^254 circuit), the Modbus
// CRC-16, and the YASIR frame transforms: what the Transmitter must send for a frame,
// and what the Receiver must relay. Each testbench first checks the primitives against
// published test vectors (FIPS-197 appendix C.1, FIPS 180 "abc", RFC 2202 case 1).
package yasir_ref_pkg;
  import yasir_pkg::*;

  typedef byte unsigned bytes_t[$];
  typedef token_t       toks_t[$];

  function automatic logic [31:0] rol(input logic [31:0] x, input int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  function automatic logic [159:0] sha1(input bytes_t m);
    logic [31:0] h0, h1, h2, h3, h4, a, b, c, d, e, f, k, t;
    logic [31:0] w [80];
    bytes_t p;
    longint unsigned bits;
    p = m;
    bits = 64'(m.size()) * 8;
    p.push_back(8'h80);
    while ((p.size() % 64) != 56) p.push_back(8'h00);
    for (int i = 7; i >= 0; i--) p.push_back(8'(bits >> (8*i)));
    h0 = 32'h67452301; h1 = 32'hEFCDAB89; h2 = 32'h98BADCFE; h3 = 32'h10325476; h4 = 32'hC3D2E1F0;
    for (int blk = 0; blk < p.size() / 64; blk++) begin
      for (int i = 0; i < 16; i++)
        w[i] = {p[blk*64+4*i], p[blk*64+4*i+1], p[blk*64+4*i+2], p[blk*64+4*i+3]};
      for (int i = 16; i < 80; i++) w[i] = rol(w[i-3] ^ w[i-8] ^ w[i-14] ^ w[i-16], 1);
      a = h0; b = h1; c = h2; d = h3; e = h4;
      for (int i = 0; i < 80; i++) begin
        if (i < 20)      begin f = (b & c) | (~b & d);           k = 32'h5A827999; end
        else if (i < 40) begin f = b ^ c ^ d;                    k = 32'h6ED9EBA1; end
        else if (i < 60) begin f = (b & c) | (b & d) | (c & d);  k = 32'h8F1BBCDC; end
        else             begin f = b ^ c ^ d;                    k = 32'hCA62C1D6; end
        t = rol(a, 5) + f + e + k + w[i];
        e = d; d = c; c = rol(b, 30); b = a; a = t;
      end
      h0 += a; h1 += b; h2 += c; h3 += d; h4 += e;
    end
    return {h0, h1, h2, h3, h4};
  endfunction

  function automatic bytes_t to_bytes(input logic [159:0] v, input int n);
    bytes_t q;
    for (int i = 0; i < n; i++) q.push_back(v[159 - 8*i -: 8]);
    return q;
  endfunction

  // Full 160-bit HMAC-SHA-1 with a key of at most 64 octets.
  function automatic logic [159:0] hmac_sha1(input bytes_t key, input bytes_t m);
    bytes_t ik, ok;
    logic [159:0] inner;
    for (int i = 0; i < 64; i++) begin
      byte unsigned kb;
      kb = (i < key.size()) ? key[i] : 8'h00;
      ik.push_back(kb ^ 8'h36);
      ok.push_back(kb ^ 8'h5c);
    end
    foreach (m[i]) ik.push_back(m[i]);
    inner = sha1(ik);
    for (int i = 0; i < 20; i++) ok.push_back(inner[159 - 8*i -: 8]);
    return sha1(ok);
  endfunction

  // YASIR tag: first 80 bits of HMAC_HK(seq || digest).
  function automatic logic [79:0] yasir_mac(input logic [159:0] hk, input logic [31:0] seq,
                                            input logic [159:0] digest);
    bytes_t m;
    logic [159:0] h;
    for (int i = 0; i < 4; i++) m.push_back(seq[31 - 8*i -: 8]);
    for (int i = 0; i < 20; i++) m.push_back(digest[159 - 8*i -: 8]);
    h = hmac_sha1(to_bytes(hk, 20), m);
    return h[159:80];
  endfunction

  // ---------------- AES-128 ----------------
  function automatic void aes_sbox_table(output byte unsigned sb[256]);
    byte unsigned p, q, x;
    p = 1; q = 1;
    do begin
      // p <- p * 3
      p = p ^ (p << 1) ^ (p[7] ? 8'h1b : 8'h00);
      // q <- q / 3
      q ^= q << 1; q ^= q << 2; q ^= q << 4;
      if (q[7]) q ^= 8'h09;
      x = q ^ {q[6:0], q[7]} ^ {q[5:0], q[7:6]} ^ {q[4:0], q[7:5]} ^ {q[3:0], q[7:4]};
      sb[p] = x ^ 8'h63;
    end while (p != 1);
    sb[0] = 8'h63;
  endfunction

  function automatic byte unsigned xt(input byte unsigned a);
    return (a << 1) ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [127:0] aes128(input logic [127:0] key, input logic [127:0] pt);
    byte unsigned sb[256];
    byte unsigned s[16], ns[16], rk[176], t[4], rc;
    aes_sbox_table(sb);
    for (int i = 0; i < 16; i++) rk[i] = key[127 - 8*i -: 8];
    rc = 1;
    for (int i = 16; i < 176; i += 4) begin
      for (int j = 0; j < 4; j++) t[j] = rk[i - 4 + j];
      if (i % 16 == 0) begin
        byte unsigned tmp;
        tmp = t[0]; t[0] = sb[t[1]] ^ rc; t[1] = sb[t[2]]; t[2] = sb[t[3]]; t[3] = sb[tmp];
        rc = xt(rc);
      end
      for (int j = 0; j < 4; j++) rk[i + j] = rk[i - 16 + j] ^ t[j];
    end
    for (int i = 0; i < 16; i++) s[i] = pt[127 - 8*i -: 8] ^ rk[i];
    for (int r = 1; r <= 10; r++) begin
      for (int c = 0; c < 4; c++)
        for (int row = 0; row < 4; row++)
          ns[row + 4*c] = sb[s[row + 4*((c + row) % 4)]];
      if (r != 10)
        for (int c = 0; c < 4; c++) begin
          byte unsigned a0, a1, a2, a3, all;
          a0 = ns[4*c]; a1 = ns[4*c+1]; a2 = ns[4*c+2]; a3 = ns[4*c+3];
          all = a0 ^ a1 ^ a2 ^ a3;
          ns[4*c]   = a0 ^ all ^ xt(a0 ^ a1);
          ns[4*c+1] = a1 ^ all ^ xt(a1 ^ a2);
          ns[4*c+2] = a2 ^ all ^ xt(a2 ^ a3);
          ns[4*c+3] = a3 ^ all ^ xt(a3 ^ a0);
        end
      for (int i = 0; i < 16; i++) s[i] = ns[i] ^ rk[16*r + i];
    end
    for (int i = 0; i < 16; i++) aes128[127 - 8*i -: 8] = s[i];
  endfunction

  // AES-CTR keystream for a frame: block i = AES(seq || i || 0^64).
  function automatic bytes_t ctr_xor(input logic [127:0] sk, input logic [31:0] seq,
                                     input bytes_t m, input bit enc);
    bytes_t o;
    logic [127:0] ks;
    for (int i = 0; i < m.size(); i++) begin
      if (i % 16 == 0) ks = aes128(sk, {seq, 32'(i / 16), 64'd0});
      o.push_back(enc ? (m[i] ^ ks[127 - 8*(i % 16) -: 8]) : m[i]);
    end
    return o;
  endfunction

  function automatic logic [15:0] crc16(input bytes_t m);
    logic [15:0] c;
    c = 16'hFFFF;
    foreach (m[i]) begin
      c ^= {8'h00, m[i]};
      for (int b = 0; b < 8; b++) c = c[0] ? ((c >> 1) ^ 16'hA001) : (c >> 1);
    end
    return c;
  endfunction

  function automatic token_t tk(input tok_kind_e k, input byte unsigned d = 0);
    token_t t;
    t.kind = k;
    t.data = d;
    return t;
  endfunction

  // What the Transmitter sends for plaintext content m under sequence number seq.
  function automatic toks_t tx_frame(input logic [127:0] sk, input logic [159:0] hk,
                                     input logic [31:0] seq, input bit enc, input bytes_t m);
    toks_t o;
    bytes_t c;
    logic [79:0] mac;
    c = ctr_xor(sk, seq, m, enc);
    mac = yasir_mac(hk, seq, sha1(c));
    o.push_back(tk(TOK_START));
    foreach (c[i]) o.push_back(tk(TOK_DATA, c[i]));
    o.push_back(tk(TOK_END));
    for (int i = 0; i < 10; i++) o.push_back(tk(TOK_DATA, mac[79 - 8*i -: 8]));
    for (int i = 0; i < 4; i++) o.push_back(tk(TOK_DATA, seq[31 - 8*i -: 8]));
    o.push_back(tk(TOK_END));
    return o;
  endfunction

  // What the Receiver relays for plaintext p when the tag verifies (ok) or not.
  function automatic toks_t rx_relay(input bytes_t p, input bit ok);
    toks_t o;
    logic [15:0] c;
    o.push_back(tk(TOK_START));
    foreach (p[i]) o.push_back(tk(TOK_DATA, p[i]));
    if (!ok) begin
      c = ~crc16(p);
      o.push_back(tk(TOK_DATA, c[7:0]));
      o.push_back(tk(TOK_DATA, c[15:8]));
    end
    o.push_back(tk(TOK_END));
    return o;
  endfunction

  function automatic bytes_t rand_bytes(input int n);
    bytes_t q;
    for (int i = 0; i < n; i++) q.push_back(8'($urandom));
    return q;
  endfunction

  function automatic bytes_t str_bytes(input string s);
    bytes_t q;
    for (int i = 0; i < s.len(); i++) q.push_back(s[i]);
    return q;
  endfunction

endpackage
