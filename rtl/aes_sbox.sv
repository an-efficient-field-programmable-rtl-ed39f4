// aes_sbox: the AES SubBytes substitution for one byte.
//
// Purely combinational. The 256-entry table is a constant computed at
// elaboration by aes_pkg::sbox_table(): each byte is replaced by its
// multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1 (0 stays 0) and
// then passed through the FIPS-197 affine transform with constant 0x63.
// Synthesis turns the constant table into a ROM or LUT logic. The core uses
// sixteen of these per SubBytes stage and four per key-expansion round.
//
// The substitution is the standard one; building it as an elaborated
// constant table is this implementation's choice.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t a,   // byte to substitute
  output byte_t y    // S(a), same cycle
);

  localparam sbox_table_t SBOX = sbox_table();

  assign y = SBOX[a];

endmodule
