// tb_prng_configs: runs chaotic_prng in the precision / pipeline-depth
// combinations the generator was evaluated in (the best configuration per
// precision, the 64-bit variants with pDelayH = 0 and the deepest one, and
// the unpipelined loop), each against the reference model. The 16-bit and
// 32/48-bit variants keep the low 16 bits as the output word; the 64-bit
// ones keep 56.
module tb_prng_configs;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NCFG = 8;
  localparam int CFG_ARITH [NCFG] = '{16, 32, 48, 64, 64, 64, 64, 64};
  localparam int CFG_H     [NCFG] = '{ 1,  1,  3,  1,  0,  0,  4,  1};
  localparam int CFG_S     [NCFG] = '{ 3,  3,  4,  4,  4,  0,  4,  0};
  localparam int CFG_WORD  [NCFG] = '{16, 16, 16, 56, 56, 56, 16, 16};

  logic [NCFG-1:0] done;
  int checks [NCFG];
  int failures [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int W  = CFG_ARITH[g];
    localparam int PW = CFG_WORD[g];
    logic rst, init_sel;
    logic [W-1:0] init_x, init_y, init_z, out_x, out_y, out_z;
    logic [PW-1:0] word_x, word_y, word_z;

    chaotic_prng #(
      .P_ARITH(W), .P_DELAY_H(CFG_H[g]), .P_DELAY_S(CFG_S[g]), .P_WORD(PW)
    ) dut (.*);

    prng_stim_check #(
      .P_ARITH(W), .P_DELAY_H(CFG_H[g]), .P_DELAY_S(CFG_S[g]), .P_WORD(PW),
      .N_CYCLES(6000)
    ) chk (.*, .done(done[g]), .checks(checks[g]), .failures(failures[g]));
  end

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

  initial begin
    int c, f;
    wait (&done);
    c = 0;
    f = 0;
    for (int i = 0; i < NCFG; i++) begin
      c += checks[i];
      f += failures[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
