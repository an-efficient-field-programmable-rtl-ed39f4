// aes_key_round: one round of the AES-128 key expansion, in two steps.
//
// Given round key r-1 as four words w0..w3, round key r is
//   t  = SubWord(RotWord(w3)) ^ {Rcon[r], 00, 00, 00}
//   w4 = w0 ^ t,  w5 = w1 ^ w4,  w6 = w2 ^ w5,  w7 = w3 ^ w6.
// The work is split into two registered steps so that keys can be expanded
// for a new key on every clock, alongside the data pipeline:
//   step 1: t is formed (four S-boxes, rotation, round constant) and
//           registered together with a copy of the incoming key;
//   step 2: the XOR chain forms w4..w7, which are registered as key_o.
// Latency is two cycles from key_i to key_o, one key per clock; there is no
// reset or enable. ROUND (1..10) selects the round constant x^(ROUND-1).
//
// Generating each round key in two steps follows the published design;
// what goes into each step is this implementation's reading of it.
module aes_key_round
  import aes_pkg::*;
#(
  parameter int unsigned ROUND = 1
) (
  input  logic   clk,
  input  state_t key_i,   // round key ROUND-1
  output state_t key_o    // round key ROUND, two cycles later
);

  localparam byte_t RCON = rcon(ROUND);

  word_t  rot, sub;
  word_t  t_q;
  state_t key_q;

  // RotWord: cyclic left rotation of the bytes of w3.
  assign rot = {key_i[3][1], key_i[3][2], key_i[3][3], key_i[3][0]};

  for (genvar r = 0; r < 4; r++) begin : g_sub
    aes_sbox u_sbox (.a(rot[r]), .y(sub[r]));
  end

  // Step 1.
  always_ff @(posedge clk) begin
    t_q   <= sub ^ {RCON, 24'h000000};
    key_q <= key_i;
  end

  // Step 2.
  state_t next_key;
  assign next_key[0] = key_q[0] ^ t_q;
  assign next_key[1] = key_q[1] ^ key_q[0] ^ t_q;
  assign next_key[2] = key_q[2] ^ key_q[1] ^ key_q[0] ^ t_q;
  assign next_key[3] = key_q[3] ^ key_q[2] ^ key_q[1] ^ key_q[0] ^ t_q;

  always_ff @(posedge clk) key_o <= next_key;

endmodule
