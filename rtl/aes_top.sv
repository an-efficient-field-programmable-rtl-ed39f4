// aes_top: fully pipelined AES-128 encryption core.
//
// A new 128-bit plaintext and a new 128-bit key may be presented on every
// clock; the matching ciphertext appears on ciphertext_o LATENCY = 30 clocks
// later, so the core encrypts one block per cycle. Every transformation of
// the cipher is a registered stage of its own:
//
//   AddKey(0) | for r = 1..9: Sbox+ShiftRows, MixColumns, AddKey(r) |
//   Sbox+ShiftRows, AddKey(10)
//
// which is 1 + 27 + 2 = 30 stages. Because the key is an input that may
// change every cycle, the round keys are expanded in a second pipeline that
// runs beside the data: aes_key_round r takes round key r-1 and delivers
// round key r two cycles later. Round key r-1 is ready when AddKey(r-1)
// runs, so key round r does its first step in that cycle and its second in
// round r's Sbox+ShiftRows cycle; for rounds 1..9 one more register holds
// the key over the MixColumns cycle, and for round 10, which has no
// MixColumns, the key arrives exactly at the final AddKey.
//
// Ports are the clock, the key, the plaintext and the ciphertext, each
// 128-bit block as a 4x4 byte array indexed [column][row] in FIPS-197 byte
// order (byte n of the block is [n/4][n%4]). There is no reset, enable or
// valid flag: the pipeline is free-running and the user tracks the fixed
// latency. The first LATENCY outputs after power-up are meaningless.
//
// The chain of stages, the port names and shapes and the two-step key
// generation follow the published fully pipelined design this core is
// modelled on. The placement of one register per transformation, the
// [column][row] byte order and the absence of control signals are this
// implementation's own choices.
module aes_top
  import aes_pkg::*;
(
  input  logic   clk,
  input  state_t keyblock_i,    // cipher key
  input  state_t plaintext_i,   // plaintext block
  output state_t ciphertext_o   // ciphertext, LATENCY cycles later
);

  // Data pipeline: s[r] is the state after AddKey(r).
  state_t s     [0:NR-1];
  state_t a     [1:NR];      // after Sbox+ShiftRows of round r
  state_t b     [1:NR-1];    // after MixColumns of round r
  // Key pipeline: k[r] is round key r as it leaves its generator,
  // kd[r] the same key one cycle later, aligned with AddKey(r).
  state_t k     [1:NR];
  state_t kd    [1:NR-1];

  aes_addkey u_addkey0 (.clk, .d(plaintext_i), .k(keyblock_i), .q(s[0]));

  for (genvar r = 1; r <= NR; r++) begin : g_round
    aes_key_round #(.ROUND(r)) u_key (
      .clk,
      .key_i (r == 1 ? keyblock_i : kd[r-1]),
      .key_o (k[r])
    );

    aes_subshift u_subshift (.clk, .d(s[r-1]), .q(a[r]));

    if (r < NR) begin : g_full
      aes_mixcol u_mixcol (.clk, .d(a[r]), .q(b[r]));

      always_ff @(posedge clk) kd[r] <= k[r];

      aes_addkey u_addkey (.clk, .d(b[r]), .k(kd[r]), .q(s[r]));
    end else begin : g_final
      aes_addkey u_addkey (.clk, .d(a[r]), .k(k[r]), .q(ciphertext_o));
    end
  end

endmodule
