// aes_mixcol_tb: test of the MixColumns stage.
//
// Sends the FIPS-197 Appendix B round-1 state after ShiftRows, then random
// states, one per clock, and checks one clock later that the register
// holds MixColumns(d) from the reference model, which multiplies by the
// circulant matrix [02 03 01 01] with a generic GF(2^8) multiply. The
// published round-1 MixColumns result is also checked as a constant.
module aes_mixcol_tb;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic   clk = 1'b0;
  state_t d, q;
  int checks = 0, failures = 0;

  aes_mixcol dut (.clk, .d, .q);

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
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (q !== expected) begin
          failures++;
          $display("step %0d: got %032h expected %032h", i, q, expected);
        end
      end
      if (i == 1) begin
        checks++;
        if (q !== 128'h046681e5e0cb199a48f8d37a2806264c) failures++;
      end
      d = (i == 0) ? 128'hd4bf5d30e0b452aeb84111f11e2798e5 : rand128();
      expected = to_vec(mix_columns(to_blk(d)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
