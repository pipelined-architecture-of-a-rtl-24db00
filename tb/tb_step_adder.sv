// tb_step_adder: checks a + b/16 (adder) and a - b/16 (subtractor) with the
// default pDelayH = 1 register stage at 64 bits, and an unpipelined 32-bit
// adder, against floor division in the reference model.
module tb_step_adder;
  import prng_model_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic signed [63:0] a, b, r_add, r_sub;
  logic signed [31:0] a32, b32, r32;
  int checks = 0, failures = 0;
  longint exp_add, exp_sub;

  always #5 clk = ~clk;

  step_adder dut_add (.clk, .rst, .a, .b, .r(r_add));
  step_adder #(.SUBTRACT(1'b1)) dut_sub (.clk, .rst, .a, .b, .r(r_sub));
  step_adder #(.P_ARITH(32), .P_DELAY_H(0)) dut32 (
    .clk, .rst, .a(a32), .b(b32), .r(r32)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e32;
    rst = 1'b1;
    a = '0; b = '0; a32 = '0; b32 = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 500; n++) begin
      a = rand_seed(64);
      b = (n % 3 == 0) ? -longint'(n) : rand_seed(64);
      a32 = 32'(a >>> 32);
      b32 = (n % 3 == 0) ? -32'(n) : 32'(b >>> 32);
      #1;
      e32 = wrap(longint'(a32) + floor_div_pow2(longint'(b32), 4), 32);
      checks++;
      if (longint'(r32) != e32) begin
        failures++;
        $display("32b: r=%h expected %h", r32, e32);
      end
      exp_add = wrap(longint'(a) + floor_div_pow2(longint'(b), 4), 64);
      exp_sub = wrap(longint'(a) - floor_div_pow2(longint'(b), 4), 64);
      @(posedge clk);
      #1;
      checks += 2;
      if (longint'(r_add) != exp_add) begin
        failures++;
        $display("add: r=%h expected %h", r_add, exp_add);
      end
      if (longint'(r_sub) != exp_sub) begin
        failures++;
        $display("sub: r=%h expected %h", r_sub, exp_sub);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
