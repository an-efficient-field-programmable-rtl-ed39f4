// aes_addkey: the AddRoundKey pipeline stage of the AES core.
//
// Addition in GF(2^8) is coefficient-wise modulo 2, so adding the round key
// to the state is a 128-bit XOR. The sum is registered: latency one cycle,
// one state per clock, no reset and no enable. The same stage serves as the
// initial key addition, the last step of rounds 1 to 9 and the final round.
//
// Giving AddRoundKey a registered stage of its own matches the block diagram of
// the published design; the absence of a reset is this implementation's
// choice.
module aes_addkey
  import aes_pkg::*;
(
  input  logic   clk,
  input  state_t d,   // state
  input  state_t k,   // round key, aligned with d
  output state_t q    // d ^ k, registered
);

  always_ff @(posedge clk) q <= d ^ k;

endmodule
