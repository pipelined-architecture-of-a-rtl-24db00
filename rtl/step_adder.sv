// step_adder: one Euler step a +/- h*b with h = 2^-H_SHIFT.
//
// The multiplication by h is an arithmetic right shift by H_SHIFT bits
// (blocks hY, hZ, hS), followed by an adder (X_hY, Y_hZ) or, with
// SUBTRACT = 1, a subtractor (Z_hS), and P_DELAY_H register stages
// (pDelayH). The arithmetic wraps at P_ARITH bits; the bits shifted out on
// the right are truncated. Latency from a/b to r: P_DELAY_H cycles.
// Synchronous active-high rst clears the stages.
module step_adder
  import prng_pkg::*;
#(
  parameter int unsigned P_ARITH   = DEF_ARITH,
  parameter int unsigned P_DELAY_H = DEF_DELAY_H,
  parameter bit          SUBTRACT  = 1'b0
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic signed [P_ARITH-1:0] a,
  input  logic signed [P_ARITH-1:0] b,
  output logic signed [P_ARITH-1:0] r
);

  logic signed [P_ARITH-1:0] hb;
  logic signed [P_ARITH-1:0] res;

  always_comb begin
    hb  = b >>> H_SHIFT;
    res = SUBTRACT ? (a - hb) : (a + hb);
  end

  delay_line #(.WIDTH(P_ARITH), .DEPTH(P_DELAY_H)) u_pipe (
    .clk (clk),
    .rst (rst),
    .d   (res),
    .q   (r)
  );

endmodule
