// aes_ref_pkg: reference models for the testbenches, written without the
// design's matrices. AES-128 is computed the textbook way in the standard
// field GF(2)[x]/(x^8+x^4+x^3+x+1): the S-box is the field inverse
// (a^254) followed by the FIPS-197 affine map, MixColumns uses xtime.
// The map from the standard field to the composite field
// GF(2^4)[x]/(x^2+x+{8}) is rebuilt from scratch: it sends the standard
// generator x (byte {02}) to the composite-field byte {20} and is extended
// linearly through the powers of {20}, computed with composite-field
// multiplication. Its inverse is found by search.
package aes_ref_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  // ---------------- standard field F1 ----------------
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t mul1(input byte_t a, input byte_t b);
    byte_t r = 8'h00;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = xtime(a);
    end
    return r;
  endfunction

  function automatic byte_t inv1(input byte_t a);
    byte_t r = 8'h01;
    // a^254 = a^-1 (and 0 -> 0)
    for (int i = 0; i < 254; i++) r = mul1(r, a);
    return (a == 8'h00) ? 8'h00 : r;
  endfunction

  function automatic byte_t sbox1_calc(input byte_t a);
    byte_t v = inv1(a), y;
    for (int i = 0; i < 8; i++)
      y[i] = v[i] ^ v[(i+4)%8] ^ v[(i+5)%8] ^ v[(i+6)%8] ^ v[(i+7)%8];
    return y ^ 8'h63;
  endfunction

  // S-box values are cached after the first computation.
  byte_t sbox_cache [256];
  bit    sbox_known [256] = '{default: 1'b0};

  function automatic byte_t sbox1(input byte_t a);
    if (!sbox_known[a]) begin
      sbox_cache[a] = sbox1_calc(a);
      sbox_known[a] = 1'b1;
    end
    return sbox_cache[a];
  endfunction

  function automatic byte_t get_b(input block_t s, input int r, input int c);
    return s[127-8*(r+4*c) -: 8];
  endfunction

  function automatic block_t sub_bytes1(input block_t s);
    block_t y;
    for (int k = 0; k < 16; k++) y[8*k +: 8] = sbox1(s[8*k +: 8]);
    return y;
  endfunction

  function automatic block_t shift_rows1(input block_t s);
    block_t y;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        y[127-8*(r+4*c) -: 8] = get_b(s, r, (c+r)%4);
    return y;
  endfunction

  function automatic word_t mix_col1(input word_t w);
    byte_t a0 = w[31:24], a1 = w[23:16], a2 = w[15:8], a3 = w[7:0];
    byte_t b0, b1, b2, b3;
    b0 = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
    b1 = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
    b2 = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
    b3 = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    return {b0, b1, b2, b3};
  endfunction

  function automatic block_t mix_columns1(input block_t s);
    block_t y;
    for (int c = 0; c < 4; c++) y[127-32*c -: 32] = mix_col1(s[127-32*c -: 32]);
    return y;
  endfunction

  function automatic byte_t rcon1(input int i);
    byte_t r = 8'h01;
    for (int k = 1; k < i; k++) r = xtime(r);
    return r;
  endfunction

  function automatic block_t next_key1(input block_t k, input byte_t rc);
    word_t p0 = k[127:96], p1 = k[95:64], p2 = k[63:32], p3 = k[31:0];
    word_t t, w0, w1, w2, w3;
    t  = {sbox1(p3[23:16]) ^ rc, sbox1(p3[15:8]), sbox1(p3[7:0]), sbox1(p3[31:24])};
    w0 = p0 ^ t; w1 = p1 ^ w0; w2 = p2 ^ w1; w3 = p3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  // Full AES-128 encryption.
  function automatic block_t aes128_enc(input block_t pt, input block_t key);
    block_t s = pt ^ key, k = key;
    for (int r = 1; r <= 10; r++) begin
      k = next_key1(k, rcon1(r));
      s = shift_rows1(sub_bytes1(s));
      if (r < 10) s = mix_columns1(s);
      s = s ^ k;
    end
    return s;
  endfunction

  // ---------------- composite field F2 ----------------
  function automatic logic [3:0] mul4(input logic [3:0] a, input logic [3:0] b);
    logic [3:0] r = 4'h0;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) r ^= a;
      a = {a[2:0], 1'b0} ^ (a[3] ? 4'h3 : 4'h0);  // y^4 = y + 1
    end
    return r;
  endfunction

  // (b1 x + c1)(b2 x + c2) with x^2 = x + {8}
  function automatic byte_t mul2f(input byte_t p, input byte_t q);
    logic [3:0] b1 = p[7:4], c1 = p[3:0], b2 = q[7:4], c2 = q[3:0];
    logic [3:0] bb = mul4(b1, b2);
    return {bb ^ mul4(b1, c2) ^ mul4(c1, b2), mul4(bb, 4'h8) ^ mul4(c1, c2)};
  endfunction

  function automatic byte_t phi_ref(input byte_t a);
    byte_t z = 8'h01, r = 8'h00;
    for (int i = 0; i < 8; i++) begin
      if (a[i]) r ^= z;
      z = mul2f(z, 8'h20);
    end
    return r;
  endfunction

  function automatic byte_t phi_inv_ref(input byte_t v);
    for (int a = 0; a < 256; a++) if (phi_ref(byte_t'(a)) == v) return byte_t'(a);
    return 8'h00;
  endfunction

  function automatic block_t phi_blk(input block_t s);
    block_t y;
    for (int k = 0; k < 16; k++) y[8*k +: 8] = phi_ref(s[8*k +: 8]);
    return y;
  endfunction

  function automatic block_t phi_inv_blk(input block_t s);
    block_t y;
    for (int k = 0; k < 16; k++) y[8*k +: 8] = phi_inv_ref(s[8*k +: 8]);
    return y;
  endfunction

  function automatic block_t rand_block();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
