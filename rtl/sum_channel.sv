// sum_channel: the sum channel S = Z + B(Y)*Y + X of the Euler update for Z.
//
// The three-input adder Z_BY_X is followed by P_DELAY_S register stages
// (pDelayS), the pipelining the generator applies to its longest path; a
// synthesis tool retimes them into the adder. Inputs are the current state
// registers X, Y, Z; the FDNR product B(Y)*Y is formed inside by fdnr_by.
// The sum wraps at P_ARITH bits. Latency from x/y/z to s: P_DELAY_S cycles
// (0 makes it combinational). Synchronous active-high rst clears the stages.
module sum_channel
  import prng_pkg::*;
#(
  parameter int unsigned P_ARITH   = DEF_ARITH,
  parameter int unsigned P_DELAY_S = DEF_DELAY_S
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic signed [P_ARITH-1:0] x,
  input  logic signed [P_ARITH-1:0] y,
  input  logic signed [P_ARITH-1:0] z,
  output logic signed [P_ARITH-1:0] s
);

  logic signed [P_ARITH-1:0] by;
  logic signed [P_ARITH-1:0] sum;

  fdnr_by #(.P_ARITH(P_ARITH)) u_by (
    .y  (y),
    .by (by)
  );

  assign sum = z + by + x;

  delay_line #(.WIDTH(P_ARITH), .DEPTH(P_DELAY_S)) u_pipe (
    .clk (clk),
    .rst (rst),
    .d   (sum),
    .q   (s)
  );

endmodule
