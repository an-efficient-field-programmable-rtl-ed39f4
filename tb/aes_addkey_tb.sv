// aes_addkey_tb: test of the AddRoundKey stage.
//
// Drives random state/key pairs on every falling clock edge and checks, one
// clock later, that the registered output is the bytewise XOR computed by
// the reference model; this also checks the one-cycle latency.
module aes_addkey_tb;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic   clk = 1'b0;
  state_t d, k, q;
  int checks = 0, failures = 0;

  aes_addkey dut (.clk, .d, .k, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [127:0] expected;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (q !== expected) begin
          failures++;
          $display("step %0d: got %032h expected %032h", i, q, expected);
        end
      end
      d = rand128();
      k = rand128();
      expected = to_vec(add_key(to_blk(d), to_blk(k)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
