// aes_sbox_tb: exhaustive test of the S-box.
//
// Applies all 256 inputs and compares each output with the brute-force
// model in aes_ref_pkg, and a handful of entries with the values published
// in FIPS-197 (Figure 7). The S-box is combinational; each value is
// sampled one time step after it is applied.
module aes_sbox_tb;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  byte_t a, y;
  int checks = 0, failures = 0;

  aes_sbox dut (.a, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(byte_t in, byte_t expected);
    a = in;
    #1;
    checks++;
    if (y !== expected) begin
      failures++;
      $display("S(%02h) = %02h, expected %02h", in, y, expected);
    end
  endtask

  initial begin
    init();
    for (int i = 0; i < 256; i++) check(byte_t'(i), sb[i]);
    check(8'h00, 8'h63);
    check(8'h01, 8'h7c);
    check(8'h53, 8'hed);
    check(8'h9a, 8'hb8);
    check(8'hff, 8'h16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
