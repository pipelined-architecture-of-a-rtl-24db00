// chaotic_prng: pipelined pseudo-random number generator built on the Euler
// discretisation of an oscillator with a frequency-dependent negative
// resistance (FDNR):
//
//   X' = X + h*Y
//   Y' = Y + h*Z
//   Z' = Z - h*(Z + B(Y)*Y + X),   B = 4 if Y >= 1, else 0,   h = 2^-4
//
// All multiplications are shifts, so the datapath is adders, a comparator,
// multiplexers and registers. The sum channel (sum_channel) has P_DELAY_S
// register stages; the buffers DelayX/DelayY/DelayZ (delay_line) hold the
// state for the same P_DELAY_S cycles; the three step adders (step_adder)
// add P_DELAY_H stages; the state registers (state_reg) close the loop. The
// loop therefore spans L = P_DELAY_S + P_DELAY_H + 1 cycles and carries L
// independent trajectories, one per clock slot, so every clock cycle yields
// a new (X, Y, Z) triple.
//
// Interface: while init_sel is 1 the state registers load init_x/y/z on
// every cycle; holding it for L cycles gives each slot its own seed. With
// init_sel at 0 the outputs out_x/y/z are the state registers (outX, outY,
// outZ) and advance one Euler step per slot every L cycles. word_x/y/z are
// the P_WORD low-order bits of each output: the post-processing that drops
// the more significant bits, which are not random enough. rst (synchronous,
// active high) clears every register.
//
// The equations, the number format, h, beta1, beta2, the pipeline
// parameters and the block structure follow the generator's description;
// the reset, the select polarity of the init multiplexers and the use of
// the delayed Y and Z as inputs of the shifts hY and hZ are choices made here.
module chaotic_prng
  import prng_pkg::*;
#(
  parameter int unsigned P_ARITH   = DEF_ARITH,
  parameter int unsigned P_DELAY_H = DEF_DELAY_H,
  parameter int unsigned P_DELAY_S = DEF_DELAY_S,
  parameter int unsigned P_WORD    = DEF_WORD
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               init_sel,
  input  logic [P_ARITH-1:0] init_x,
  input  logic [P_ARITH-1:0] init_y,
  input  logic [P_ARITH-1:0] init_z,
  output logic [P_ARITH-1:0] out_x,
  output logic [P_ARITH-1:0] out_y,
  output logic [P_ARITH-1:0] out_z,
  output logic [P_WORD-1:0]  word_x,
  output logic [P_WORD-1:0]  word_y,
  output logic [P_WORD-1:0]  word_z
);

  if (P_WORD > P_ARITH || P_WORD == 0) begin : g_bad_word
    $error("P_WORD must be between 1 and P_ARITH");
  end

  logic signed [P_ARITH-1:0] x, y, z;        // state registers
  logic signed [P_ARITH-1:0] dx, dy, dz;     // DelayX, DelayY, DelayZ
  logic signed [P_ARITH-1:0] s;              // Z + B(Y)*Y + X, delayed
  logic signed [P_ARITH-1:0] nx, ny, nz;     // next state from step adders

  // Sum channel Z_BY_X with the FDNR nonlinearity.
  sum_channel #(.P_ARITH(P_ARITH), .P_DELAY_S(P_DELAY_S)) u_sum (
    .clk (clk), .rst (rst), .x (x), .y (y), .z (z), .s (s)
  );

  // Alignment buffers.
  delay_line #(.WIDTH(P_ARITH), .DEPTH(P_DELAY_S)) u_delay_x (
    .clk (clk), .rst (rst), .d (x), .q (dx)
  );
  delay_line #(.WIDTH(P_ARITH), .DEPTH(P_DELAY_S)) u_delay_y (
    .clk (clk), .rst (rst), .d (y), .q (dy)
  );
  delay_line #(.WIDTH(P_ARITH), .DEPTH(P_DELAY_S)) u_delay_z (
    .clk (clk), .rst (rst), .d (z), .q (dz)
  );

  // Step adders X_hY, Y_hZ and subtractor Z_hS.
  step_adder #(.P_ARITH(P_ARITH), .P_DELAY_H(P_DELAY_H), .SUBTRACT(1'b0)) u_x_hy (
    .clk (clk), .rst (rst), .a (dx), .b (dy), .r (nx)
  );
  step_adder #(.P_ARITH(P_ARITH), .P_DELAY_H(P_DELAY_H), .SUBTRACT(1'b0)) u_y_hz (
    .clk (clk), .rst (rst), .a (dy), .b (dz), .r (ny)
  );
  step_adder #(.P_ARITH(P_ARITH), .P_DELAY_H(P_DELAY_H), .SUBTRACT(1'b1)) u_z_hs (
    .clk (clk), .rst (rst), .a (dz), .b (s), .r (nz)
  );

  // Initialisation multiplexers and state registers.
  state_reg #(.P_ARITH(P_ARITH)) u_reg_x (
    .clk (clk), .rst (rst), .init_sel (init_sel), .init_val (init_x),
    .next_val (nx), .q (x)
  );
  state_reg #(.P_ARITH(P_ARITH)) u_reg_y (
    .clk (clk), .rst (rst), .init_sel (init_sel), .init_val (init_y),
    .next_val (ny), .q (y)
  );
  state_reg #(.P_ARITH(P_ARITH)) u_reg_z (
    .clk (clk), .rst (rst), .init_sel (init_sel), .init_val (init_z),
    .next_val (nz), .q (z)
  );

  assign out_x  = x;
  assign out_y  = y;
  assign out_z  = z;
  assign word_x = x[P_WORD-1:0];
  assign word_y = y[P_WORD-1:0];
  assign word_z = z[P_WORD-1:0];

endmodule
