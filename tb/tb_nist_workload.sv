// tb_nist_workload: produces, with chaotic_prng at its default parameters,
// as many output bits as one NIST SP800-22 run uses (128 sequences of
// 2^20 bits = 134,217,728 bits; 3 streams x 56 bits per clock, so 798,916
// clocks after seeding). Every state is compared with the reference model.
// The words are also checked for bit balance, a necessary (not sufficient)
// property of a usable stream: the share of ones in each of the 56 word
// bit positions of each stream must lie within 6 standard deviations of
// one half, and the share over all bits within 6 standard deviations too.
module tb_nist_workload;
  import prng_pkg::*;
  import prng_model_pkg::*;

  localparam int  W      = DEF_ARITH;
  localparam int  PW     = DEF_WORD;
  localparam int  L      = DEF_DELAY_S + DEF_DELAY_H + 1;
  localparam longint NBITS  = 128 * (longint'(1) << 20);
  localparam int  NCYCLE = int'((NBITS + 3 * PW - 1) / (3 * PW));

  logic clk = 1'b0;
  logic rst, init_sel;
  logic [W-1:0] init_x, init_y, init_z, out_x, out_y, out_z;
  logic [PW-1:0] word_x, word_y, word_z;
  int checks = 0, failures = 0;
  longint ones [3][PW];
  state_t hist [L];

  always #5 clk = ~clk;

  chaotic_prng dut (.*);

  initial begin
    #20000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    real p, tol, total;
    longint all;
    int bad_state;
    for (int s = 0; s < 3; s++)
      for (int b = 0; b < PW; b++) ones[s][b] = 0;
    rst = 1'b1;
    init_sel = 1'b0;
    {init_x, init_y, init_z} = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    // Seed all L slots.
    for (int i = 0; i < L; i++) begin
      hist[i].x = rand_seed(W);
      hist[i].y = rand_seed(W);
      hist[i].z = rand_seed(W);
      init_sel = 1'b1;
      init_x = W'(hist[i].x);
      init_y = W'(hist[i].y);
      init_z = W'(hist[i].z);
      @(posedge clk);
      #1;
    end
    init_sel = 1'b0;
    bad_state = 0;
    for (int c = 0; c < NCYCLE; c++) begin
      int k;
      k = c % L;
      hist[k] = step(hist[k], W);
      @(posedge clk);
      #1;
      if (longint'(out_x) != hist[k].x || longint'(out_y) != hist[k].y ||
          longint'(out_z) != hist[k].z) bad_state++;
      for (int b = 0; b < PW; b++) begin
        ones[0][b] += longint'(word_x[b]);
        ones[1][b] += longint'(word_y[b]);
        ones[2][b] += longint'(word_z[b]);
      end
    end
    checks++;
    if (bad_state != 0) begin
      failures++;
      $display("%0d cycles differ from the reference model", bad_state);
    end
    // Balance per bit position: n = NCYCLE samples, sigma = 0.5/sqrt(n).
    tol = 6.0 * 0.5 / $sqrt(real'(NCYCLE));
    all = 0;
    for (int s = 0; s < 3; s++)
      for (int b = 0; b < PW; b++) begin
        p = real'(ones[s][b]) / real'(NCYCLE);
        all += ones[s][b];
        checks++;
        if (p < 0.5 - tol || p > 0.5 + tol) begin
          failures++;
          $display("stream %0d bit %0d: share of ones %f", s, b, p);
        end
      end
    total = real'(all) / (3.0 * PW * NCYCLE);
    checks++;
    if (total < 0.5 - tol / $sqrt(3.0 * PW) || total > 0.5 + tol / $sqrt(3.0 * PW)) begin
      failures++;
      $display("overall share of ones %f", total);
    end
    $display("%0d bits generated in %0d clocks, share of ones %f", 3 * PW * NCYCLE,
             NCYCLE, total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
