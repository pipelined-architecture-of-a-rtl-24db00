// fdnr_by: the FDNR nonlinearity, the product B(Y)*Y of the chaotic
// oscillator.
//
// B is beta1 = 2^2 when Y >= 1 and beta2 = 0 otherwise. A signed comparator
// (1 > Y) drives the select of a two-way multiplexer that passes either Y or
// zero, and a fixed left shift by BETA1_SHIFT multiplies the result by
// beta1, so no multiplier is needed. The shift keeps the word width: bits
// shifted past the MSB are dropped (two's-complement wrap), as in a
// fixed-width datapath. The two low bits of by are always zero, a
// consequence of the shift. Purely combinational; y and by are signed fixed
// point with INT_BITS integer bits (sign included).
module fdnr_by
  import prng_pkg::*;
#(
  parameter int unsigned P_ARITH = DEF_ARITH
) (
  input  logic signed [P_ARITH-1:0] y,
  output logic signed [P_ARITH-1:0] by
);

  localparam int unsigned FRAC = P_ARITH - INT_BITS;
  localparam logic signed [P_ARITH-1:0] ONE = P_ARITH'(1) << FRAC;

  logic                      one_gt_y;   // comparator If_1_gt_Y
  logic signed [P_ARITH-1:0] b_of_y;     // multiplexer B(Y)

  always_comb begin
    one_gt_y = (ONE > y);
    b_of_y   = one_gt_y ? '0 : y;
    by       = b_of_y <<< BETA1_SHIFT;
  end

endmodule
