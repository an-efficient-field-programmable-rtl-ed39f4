// aes_ref_pkg: a plain software model of AES-128 encryption for the
// testbenches, written independently of the RTL.
//
// Blocks are byte arrays in FIPS-197 order (byte n = row n%4, column n/4).
// The S-box is found by brute force: for each byte the inverse is searched
// among all 256 candidates using a bit-serial polynomial multiply reduced by
// 0x11B, then the affine map is applied as b ^ rotl1 ^ rotl2 ^ rotl3 ^ rotl4
// ^ 0x63. Call init() once before using the other functions.
package aes_ref_pkg;

  typedef bit [7:0] rbyte_t;
  typedef rbyte_t   blk_t [16];

  rbyte_t sb [256];

  function automatic rbyte_t pmul(rbyte_t a, rbyte_t b);
    bit [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h011B << (i - 8);
    return p[7:0];
  endfunction

  function automatic rbyte_t rotl(rbyte_t v, int n);
    return (v << n) | (v >> (8 - n));
  endfunction

  function automatic void init();
    for (int a = 0; a < 256; a++) begin
      rbyte_t inv = 0;
      for (int b = 1; b < 256; b++) if (pmul(rbyte_t'(a), rbyte_t'(b)) == 8'h01) inv = rbyte_t'(b);
      sb[a] = inv ^ rotl(inv, 1) ^ rotl(inv, 2) ^ rotl(inv, 3) ^ rotl(inv, 4) ^ 8'h63;
    end
  endfunction

  // Conversions between a 128-bit vector (byte 0 in bits 127:120) and blk_t.
  function automatic blk_t to_blk(bit [127:0] v);
    blk_t b;
    for (int n = 0; n < 16; n++) b[n] = v[127 - 8*n -: 8];
    return b;
  endfunction

  function automatic bit [127:0] to_vec(blk_t b);
    bit [127:0] v;
    for (int n = 0; n < 16; n++) v[127 - 8*n -: 8] = b[n];
    return v;
  endfunction

  function automatic blk_t sub_bytes(blk_t s);
    blk_t o;
    foreach (s[n]) o[n] = sb[s[n]];
    return o;
  endfunction

  // Row r (bytes r, r+4, r+8, r+12) rotated left by r positions.
  function automatic blk_t shift_rows(blk_t s);
    blk_t o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) o[4*c + r] = s[4*((c + r) % 4) + r];
    return o;
  endfunction

  // Matrix product with the circulant [02 03 01 01] using pmul.
  function automatic blk_t mix_columns(blk_t s);
    blk_t o;
    rbyte_t m [4] = '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[4*c + r] = 0;
        for (int j = 0; j < 4; j++)
          o[4*c + r] ^= pmul(m[(j - r + 4) % 4], s[4*c + j]);
      end
    return o;
  endfunction

  function automatic blk_t add_key(blk_t s, blk_t k);
    blk_t o;
    foreach (s[n]) o[n] = s[n] ^ k[n];
    return o;
  endfunction

  // All 11 round keys, round 0 being the cipher key.
  typedef blk_t ks_t [11];

  function automatic ks_t expand(blk_t key);
    ks_t    ks;
    rbyte_t w [44][4];
    rbyte_t rc = 8'h01;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) w[i][j] = key[4*i + j];
    for (int i = 4; i < 44; i++) begin
      rbyte_t t [4];
      for (int j = 0; j < 4; j++) t[j] = w[i-1][j];
      if (i % 4 == 0) begin
        rbyte_t t0 = t[0];
        t[0] = sb[t[1]] ^ rc; t[1] = sb[t[2]]; t[2] = sb[t[3]]; t[3] = sb[t0];
        rc = pmul(rc, 8'h02);
      end
      for (int j = 0; j < 4; j++) w[i][j] = w[i-4][j] ^ t[j];
    end
    for (int r = 0; r < 11; r++)
      for (int n = 0; n < 16; n++) ks[r][n] = w[4*r + n/4][n%4];
    return ks;
  endfunction

  function automatic bit [127:0] encrypt(bit [127:0] key, bit [127:0] pt);
    ks_t  ks = expand(to_blk(key));
    blk_t s  = add_key(to_blk(pt), ks[0]);
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_bytes(s));
      if (r < 10) s = mix_columns(s);
      s = add_key(s, ks[r]);
    end
    return to_vec(s);
  endfunction

  function automatic bit [127:0] rand128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

endpackage
