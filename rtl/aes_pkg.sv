// aes_pkg: types and GF(2^8) arithmetic shared by the pipelined AES-128 core.
//
// The 128-bit AES state is held as a packed 4x4 array of bytes, indexed
// [column][row]. Both dimensions run 0..3 from the most significant end, so
// a 128-bit hex constant written in the usual FIPS-197 byte order
// (in0 in1 ... in15) maps byte in[4c+r] onto state[c][r] directly. A column
// is therefore also one 32-bit key word w[c].
//
// Field arithmetic is in GF(2^8) modulo m(x) = x^8 + x^4 + x^3 + x + 1:
// addition is XOR and multiplication by x ("xtime") is a left shift that
// folds the carried-out bit back in as 0x1B. The S-box table is computed
// here at elaboration (inverse, then affine map) rather than typed in, and
// the round constants come from repeated xtime of 0x01. Everything in this
// package is combinational; the module comments give the pipeline timing.
package aes_pkg;

  typedef logic [7:0]            byte_t;
  typedef logic [0:3][7:0]       word_t;   // one column / key word, row 0 first
  typedef logic [0:3][0:3][7:0]  state_t;  // [column][row]

  localparam int unsigned NR = 10;   // rounds (AES-128)

  // Pipeline depth of aes_top: initial AddRoundKey, three stages for each
  // of rounds 1..NR-1 and two for the final round.
  localparam int unsigned LATENCY = 1 + 3 * (NR - 1) + 2;

  // Reduction polynomial m(x) without its x^8 term.
  localparam byte_t POLY_LOW = 8'h1B;

  // Multiplication by x modulo m(x).
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? POLY_LOW : 8'h00);
  endfunction

  // General multiplication in GF(2^8) (shift-and-add).
  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t p = 8'h00;
    byte_t t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = xtime(t);
    end
    return p;
  endfunction

  // FIPS-197 affine transform: b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i, c = 0x63.
  function automatic byte_t affine(input byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  typedef byte_t sbox_table_t [256];

  // The full S-box, evaluated once as a constant. The inverse comes from
  // exponent/logarithm tables of the generator {03}: for a = 3^k the
  // inverse is 3^(255-k); 0 maps to 0 by definition.
  function automatic sbox_table_t sbox_table();
    sbox_table_t t;
    byte_t       pw [256];
    byte_t       lg [256];
    byte_t       g = 8'h01;
    for (int k = 0; k < 255; k++) begin
      pw[k] = g;
      lg[g] = byte_t'(k);
      g     = xtime(g) ^ g;            // g * {03}
    end
    t[0] = affine(8'h00);
    for (int i = 1; i < 256; i++)
      t[i] = affine(pw[(255 - int'(lg[i])) % 255]);
    return t;
  endfunction

  // Round constant for round r (1..10): x^(r-1) in GF(2^8).
  function automatic byte_t rcon(input int unsigned r);
    byte_t c = 8'h01;
    for (int unsigned i = 1; i < r; i++) c = xtime(c);
    return c;
  endfunction

  // ShiftRows: row r rotated left by r columns.
  function automatic state_t shift_rows(input state_t s);
    state_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[c][r] = s[(c + r) % 4][r];
    return o;
  endfunction

  // MixColumns on one column: multiply by {03}x^3 + {01}x^2 + {01}x + {02}.
  function automatic word_t mix_column(input word_t a);
    word_t o;
    for (int r = 0; r < 4; r++)
      o[r] = xtime(a[r]) ^ (xtime(a[(r+1)%4]) ^ a[(r+1)%4]) ^ a[(r+2)%4] ^ a[(r+3)%4];
    return o;
  endfunction

endpackage
