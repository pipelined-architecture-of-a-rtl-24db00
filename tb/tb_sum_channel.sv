// tb_sum_channel: checks the pipelined sum Z + B(Y)*Y + X at its default
// size (64 bits, pDelayS = 4) and unpipelined (16 bits, pDelayS = 0).
// Random inputs in the range (-2, 2) go in every cycle; the reference model
// computes the sum and a queue supplies the pDelayS-cycle latency.
module tb_sum_channel;
  import prng_model_pkg::*;
  import prng_pkg::*;

  localparam int D = DEF_DELAY_S;

  logic clk = 1'b0;
  logic rst;
  logic signed [63:0] x, y, z, s;
  logic signed [15:0] x16, y16, z16, s16;
  int checks = 0, failures = 0;
  int big_y = 0;
  longint exp_q [$];

  always #5 clk = ~clk;

  sum_channel dut (.clk, .rst, .x, .y, .z, .s);
  sum_channel #(.P_ARITH(16), .P_DELAY_S(0)) dut16 (
    .clk, .rst, .x(x16), .y(y16), .z(z16), .s(s16)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e16;
    rst = 1'b1;
    x = '0; y = '0; z = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < D; i++) exp_q.push_back(0);
    for (int n = 0; n < 500; n++) begin
      x = rand_seed(64);
      y = rand_seed(64);
      z = rand_seed(64);
      x16 = 16'(x >>> 48);
      y16 = 16'(y >>> 48);
      z16 = 16'(z >>> 48);
      if (y >= (longint'(1) <<< 60)) big_y++;
      #1;
      e16 = wrap(wrap(longint'(z16) + fdnr_by(longint'(y16), 16), 16)
                 + longint'(x16), 16);
      checks++;
      if (longint'(s16) != e16) begin
        failures++;
        $display("16b: s=%h expected %h", s16, e16);
      end
      exp_q.push_back(wrap(wrap(longint'(z) + fdnr_by(longint'(y), 64), 64)
                           + longint'(x), 64));
      @(posedge clk);
      #1;
      void'(exp_q.pop_front());
      checks++;
      if (longint'(s) != exp_q[0]) begin
        failures++;
        $display("cycle %0d: s=%h expected %h", n, s, exp_q[0]);
      end
    end
    checks++;
    if (big_y == 0) begin
      failures++;
      $display("Y >= 1 never driven");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
