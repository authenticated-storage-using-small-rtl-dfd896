// tb_ref_pkg: reference models used by the testbenches to compute expected
// values independently of the RTL: SHA-1 over a byte queue, HMAC-SHA1, and
// AES-128 encryption (the RTL only decrypts, so a testbench can encrypt a
// token here and check that the RTL recovers it).
package tb_ref_pkg;

  typedef byte unsigned bytes_t[$];

  function automatic logic [31:0] rl(input logic [31:0] x, input int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  function automatic logic [159:0] sha1_block(input logic [159:0] cv, input logic [511:0] blk);
    logic [31:0] w[80];
    logic [31:0] a, b, c, d, e, f, k, t;
    for (int i = 0; i < 16; i++) w[i] = blk[511-32*i -: 32];
    for (int i = 16; i < 80; i++) w[i] = rl(w[i-3] ^ w[i-8] ^ w[i-14] ^ w[i-16], 1);
    {a, b, c, d, e} = cv;
    for (int i = 0; i < 80; i++) begin
      case (i / 20)
        0: begin f = (b & c) | (~b & d);          k = 32'h5A827999; end
        1: begin f = b ^ c ^ d;                   k = 32'h6ED9EBA1; end
        2: begin f = (b & c) | (b & d) | (c & d); k = 32'h8F1BBCDC; end
        default: begin f = b ^ c ^ d;             k = 32'hCA62C1D6; end
      endcase
      t = rl(a, 5) + f + e + k + w[i];
      e = d; d = c; c = rl(b, 30); b = a; a = t;
    end
    return {cv[159:128] + a, cv[127:96] + b, cv[95:64] + c, cv[63:32] + d, cv[31:0] + e};
  endfunction

  function automatic logic [159:0] sha1(input bytes_t m);
    bytes_t p;
    logic [159:0] h;
    logic [63:0] bits;
    logic [511:0] blk;
    p = m;
    bits = 64'(m.size()) * 8;
    p.push_back(8'h80);
    while ((p.size() % 64) != 56) p.push_back(8'h00);
    for (int i = 7; i >= 0; i--) p.push_back(bits[8*i +: 8]);
    h = 160'h67452301_EFCDAB89_98BADCFE_10325476_C3D2E1F0;
    for (int bi = 0; bi < p.size() / 64; bi++) begin
      for (int j = 0; j < 64; j++) blk[511-8*j -: 8] = p[bi*64+j];
      h = sha1_block(h, blk);
    end
    return h;
  endfunction

  function automatic logic [159:0] hmac(input bytes_t key, input bytes_t m);
    bytes_t ki, ko;
    logic [159:0] inner;
    bytes_t k;
    k = key;
    while (k.size() < 64) k.push_back(8'h00);
    for (int i = 0; i < 64; i++) begin
      ki.push_back(k[i] ^ 8'h36);
      ko.push_back(k[i] ^ 8'h5c);
    end
    foreach (m[i]) ki.push_back(m[i]);
    inner = sha1(ki);
    for (int i = 19; i >= 0; i--) ko.push_back(inner[8*i +: 8]);
    return sha1(ko);
  endfunction

  // Append the n low bytes of v, most significant first.
  function automatic void put(ref bytes_t q, input logic [255:0] v, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(v[8*i +: 8]);
  endfunction

  // Left-align a byte queue (<= 55 bytes) into a 440-bit message field.
  function automatic logic [439:0] to_msg(input bytes_t q);
    logic [439:0] r;
    r = '0;
    foreach (q[i]) r[439-8*i -: 8] = q[i];
    return r;
  endfunction

  // ---------------------------------------------------------------- AES-128 encrypt
  function automatic logic [7:0] xt(input logic [7:0] x);
    return {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r, aa;
    r = 0; aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= aa;
      aa = xt(aa);
    end
    return r;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] x);
    logic [7:0] inv, s;
    inv = 0;
    if (x != 0)
      for (int c = 1; c < 256; c++) if (gmul(x, 8'(c)) == 8'h01) inv = 8'(c);
    s = inv;
    for (int i = 0; i < 4; i++) begin
      inv = {inv[6:0], inv[7]};
      s ^= inv;
    end
    return s ^ 8'h63;
  endfunction

  // state byte i = bits [127-8i -: 8], column-major as in FIPS-197.
  function automatic logic [127:0] aes_enc(input logic [127:0] key, input logic [127:0] pt);
    logic [127:0] rk, st, t;
    logic [7:0] rc, b[16], c[16];
    logic [31:0] w3;
    rk = key; rc = 8'h01;
    st = pt ^ rk;
    for (int r = 1; r <= 10; r++) begin
      // key schedule
      w3 = rk[31:0];
      w3 = {sbox(w3[23:16]) ^ rc, sbox(w3[15:8]), sbox(w3[7:0]), sbox(w3[31:24])};
      rk[127:96] ^= w3;
      rk[95:64]  ^= rk[127:96];
      rk[63:32]  ^= rk[95:64];
      rk[31:0]   ^= rk[63:32];
      rc = xt(rc);
      for (int i = 0; i < 16; i++) b[i] = sbox(st[127-8*i -: 8]);
      // shift rows: byte (row r, col c) at index 4c+r comes from col c+r
      for (int cc = 0; cc < 4; cc++)
        for (int rr = 0; rr < 4; rr++) c[4*cc+rr] = b[4*((cc+rr)%4)+rr];
      if (r != 10)
        for (int cc = 0; cc < 4; cc++) begin
          logic [7:0] a0, a1, a2, a3;
          a0 = c[4*cc]; a1 = c[4*cc+1]; a2 = c[4*cc+2]; a3 = c[4*cc+3];
          c[4*cc]   = xt(a0) ^ xt(a1) ^ a1 ^ a2 ^ a3;
          c[4*cc+1] = a0 ^ xt(a1) ^ xt(a2) ^ a2 ^ a3;
          c[4*cc+2] = a0 ^ a1 ^ xt(a2) ^ xt(a3) ^ a3;
          c[4*cc+3] = xt(a0) ^ a0 ^ a1 ^ a2 ^ xt(a3);
        end
      for (int i = 0; i < 16; i++) t[127-8*i -: 8] = c[i];
      st = t ^ rk;
    end
    return st;
  endfunction

endpackage
