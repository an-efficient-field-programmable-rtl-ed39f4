// aes_subshift_tb: test of the S-box + ShiftRows stage.
//
// Sends the FIPS-197 Appendix B round-1 state, then random states, one per
// clock, and checks one clock later that the register holds
// ShiftRows(SubBytes(d)) as computed by the reference model. The FIPS-197
// value (after ShiftRows of round 1) is also checked as a constant.
module aes_subshift_tb;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic   clk = 1'b0;
  state_t d, q;
  int checks = 0, failures = 0;

  aes_subshift dut (.clk, .d, .q);

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
    init();
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
        if (q !== 128'hd4bf5d30e0b452aeb84111f11e2798e5) failures++;
      end
      d = (i == 0) ? 128'h193de3bea0f4e22b9ac68d2ae9f84808 : rand128();
      expected = to_vec(aes_ref_pkg::shift_rows(sub_bytes(to_blk(d))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
