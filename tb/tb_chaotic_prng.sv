// tb_chaotic_prng: end-to-end test of chaotic_prng with every parameter at
// its default (64-bit arithmetic, pDelayH = 1, pDelayS = 4, 56-bit words):
// six interleaved trajectories seeded, run for 20000 cycles with a mid-run
// re-seed, every output compared with the reference model.
module tb_chaotic_prng;
  import prng_pkg::*;

  localparam int W = DEF_ARITH;
  localparam int PW = DEF_WORD;

  logic clk = 1'b0;
  logic rst, init_sel, done;
  logic [W-1:0] init_x, init_y, init_z, out_x, out_y, out_z;
  logic [PW-1:0] word_x, word_y, word_z;
  int checks, failures;

  always #5 clk = ~clk;

  chaotic_prng dut (.*);

  prng_stim_check #(
    .P_ARITH(W), .P_DELAY_H(DEF_DELAY_H), .P_DELAY_S(DEF_DELAY_S),
    .P_WORD(PW), .N_CYCLES(20000)
  ) chk (.*);

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
