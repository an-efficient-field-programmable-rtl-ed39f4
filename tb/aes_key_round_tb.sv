// aes_key_round_tb: test of the two-step key-expansion round.
//
// Instantiates the generator once for every round constant (ROUND = 1..10).
// On each falling edge a fresh random cipher key is expanded by the
// reference model; instance r receives round key r-1 and must deliver round
// key r exactly two clocks later. The first cipher key is the FIPS-197
// Appendix A.1 key, whose published last round key is checked as well.
module aes_key_round_tb;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int STEPS = 200;

  logic   clk = 1'b0;
  state_t key_in  [1:10];
  state_t key_out [1:10];
  int checks = 0, failures = 0;

  for (genvar r = 1; r <= 10; r++) begin : g_dut
    aes_key_round #(.ROUND(r)) dut (.clk, .key_i(key_in[r]), .key_o(key_out[r]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ks_t sched [STEPS];

  initial begin
    init();
    for (int i = 0; i < STEPS; i++)
      sched[i] = expand(to_blk(i == 0 ? 128'h2b7e151628aed2a6abf7158809cf4f3c : rand128()));
    checks++;
    if (to_vec(sched[0][10]) != 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) failures++;
    for (int i = 0; i < STEPS + 2; i++) begin
      @(negedge clk);
      if (i >= 2) begin
        for (int r = 1; r <= 10; r++) begin
          checks++;
          if (key_out[r] !== to_vec(sched[i-2][r])) begin
            failures++;
            if (failures < 10)
              $display("step %0d round %0d: got %032h expected %032h",
                       i - 2, r, key_out[r], to_vec(sched[i-2][r]));
          end
        end
      end
      if (i < STEPS)
        for (int r = 1; r <= 10; r++) key_in[r] = to_vec(sched[i][r-1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
