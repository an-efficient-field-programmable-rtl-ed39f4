// aes_subshift: the "S-box + ShiftRows" pipeline stage of the AES core.
//
// Every one of the 16 state bytes goes through its own S-box (SubBytes),
// then row r of the state is rotated left by r columns (ShiftRows, pure
// wiring), and the result is captured in a 128-bit register. One state per
// clock enters and leaves; latency is one cycle. There is no reset and no
// enable: the pipeline runs on every edge, as in the free-running core it
// belongs to.
//
// Packing SubBytes and ShiftRows into one registered stage matches the block
// diagram of
// the published design; the absence of a reset is this implementation's
// choice.
module aes_subshift
  import aes_pkg::*;
(
  input  logic   clk,
  input  state_t d,   // state before SubBytes
  output state_t q    // ShiftRows(SubBytes(d)), registered
);

  state_t sub;

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      aes_sbox u_sbox (.a(d[c][r]), .y(sub[c][r]));
    end
  end

  always_ff @(posedge clk) q <= shift_rows(sub);

endmodule
