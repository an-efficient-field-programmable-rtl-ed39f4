// aes_mixcol: the MixColumns pipeline stage of the AES core.
//
// Each of the four columns is treated as a polynomial over GF(2^8) and
// multiplied by {03}x^3 + {01}x^2 + {01}x + {02} modulo x^4 + 1, i.e.
//   o[r] = 2*a[r] ^ 3*a[r+1] ^ a[r+2] ^ a[r+3]   (row indices mod 4),
// where 2*a is xtime(a) and 3*a is xtime(a)^a, so the stage is XOR logic
// only. The result is registered: latency one cycle, one state per clock,
// no reset and no enable.
//
// Giving MixColumns a registered stage of its own matches the block diagram of
// the published design; the absence of a reset is this implementation's
// choice.
module aes_mixcol
  import aes_pkg::*;
(
  input  logic   clk,
  input  state_t d,   // state after ShiftRows
  output state_t q    // MixColumns(d), registered
);

  state_t mixed;

  always_comb
    for (int c = 0; c < 4; c++) mixed[c] = mix_column(d[c]);

  always_ff @(posedge clk) q <= mixed;

endmodule
