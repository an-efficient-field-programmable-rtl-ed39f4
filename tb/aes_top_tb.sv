// aes_top_tb: end-to-end test of the fully pipelined AES-128 core.
//
// Runs the core at its only configuration. First the two FIPS-197 example
// vectors (Appendix B and Appendix C.1) are sent, then a stream of random
// plaintexts, each with its own random key, one block on every clock with
// no gaps. Inputs change on the falling edge; on each falling edge the
// output is compared with the software model's ciphertext of the block
// presented exactly LATENCY (30) cycles earlier, which checks both the
// value and the latency. It also counts the mechanisms the core relies on:
// blocks accepted back-to-back on consecutive clocks, and key changes
// between consecutive blocks (the per-block key schedule); a mechanism that
// never occurs is a failure.
module aes_top_tb;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int NBLOCKS = 400;
  localparam int WATCHDOG_CYCLES = 5000;

  logic   clk = 1'b0;
  state_t key, pt, ct;

  aes_top dut (.clk, .keyblock_i(key), .plaintext_i(pt), .ciphertext_o(ct));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int back_to_back = 0, key_changes = 0;
  bit [127:0] exp_q [$];
  bit [127:0] key_v [NBLOCKS];
  bit [127:0] pt_v  [NBLOCKS];

  initial begin
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init();
    key_v[0] = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    pt_v[0]  = 128'h3243f6a8885a308d313198a2e0370734;
    key_v[1] = 128'h000102030405060708090a0b0c0d0e0f;
    pt_v[1]  = 128'h00112233445566778899aabbccddeeff;
    for (int i = 2; i < NBLOCKS; i++) begin
      key_v[i] = rand128();
      pt_v[i]  = rand128();
    end
    // Published ciphertexts, also checked against the model itself.
    checks += 2;
    if (encrypt(key_v[0], pt_v[0]) != 128'h3925841d02dc09fbdc118597196a0b32) failures++;
    if (encrypt(key_v[1], pt_v[1]) != 128'h69c4e0d86a7b0430d8cdb78070b4c55a) failures++;

    for (int cyc = 0; cyc < NBLOCKS + int'(LATENCY) + 1; cyc++) begin
      @(negedge clk);
      if (cyc >= int'(LATENCY) && cyc - int'(LATENCY) < NBLOCKS) begin
        automatic bit [127:0] e = exp_q.pop_front();
        checks++;
        if (ct !== e) begin
          failures++;
          if (failures < 10)
            $display("block %0d: got %032h expected %032h", cyc - int'(LATENCY), ct, e);
        end
      end
      if (cyc < NBLOCKS) begin
        key <= key_v[cyc];
        pt  <= pt_v[cyc];
        exp_q.push_back(encrypt(key_v[cyc], pt_v[cyc]));
        if (cyc > 0) begin
          back_to_back++;
          if (key_v[cyc] != key_v[cyc-1]) key_changes++;
        end
      end
    end
    $display("back-to-back blocks: %0d, key changes: %0d", back_to_back, key_changes);
    checks += 2;
    if (back_to_back == 0) failures++;
    if (key_changes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
