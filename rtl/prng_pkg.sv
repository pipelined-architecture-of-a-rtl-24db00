// prng_pkg: constants shared by the blocks of the pipelined FDNR chaotic
// pseudo-random number generator.
//
// Number format: two's-complement fixed point, P_ARITH bits wide. The MSB is
// the sign, the next three bits are the integer part and the remaining
// P_ARITH-4 bits the fraction (a "[4]:[P_ARITH-4]" number). The Euler step
// h = 2^-4 and the FDNR gain beta1 = 2^2 are powers of two, so they are
// applied as an arithmetic right shift by 4 and a left shift by 2; beta2 = 0
// is a multiplexer that selects zero. These numbers follow the generator's
// published description. The default pipeline depths (pDelayH = 1,
// pDelayS = 4) are its 64-bit configuration with the highest measured clock;
// the 56-bit output word follows from its quoted 11.48 Gbit/s per stream at
// 205 MHz.
package prng_pkg;

  // Default arithmetic precision (pArith): 16, 32, 48 or 64.
  localparam int unsigned DEF_ARITH   = 64;
  // Bits left of the binary point, sign included.
  localparam int unsigned INT_BITS    = 4;
  // Euler step h = 2^-H_SHIFT.
  localparam int unsigned H_SHIFT     = 4;
  // FDNR gain beta1 = 2^BETA1_SHIFT (beta2 = 0).
  localparam int unsigned BETA1_SHIFT = 2;
  // Register stages after each step adder (pDelayH, 0..4).
  localparam int unsigned DEF_DELAY_H = 1;
  // Register stages of the sum channel and of DelayX/Y/Z (pDelayS, 0..4).
  localparam int unsigned DEF_DELAY_S = 4;
  // Kept low-order bits of each output stream (pWord, 16..56 at 64 bits).
  localparam int unsigned DEF_WORD    = 56;


  // Loop latency in clock cycles: the number of independent trajectories
  // that are interleaved in the pipeline.
  function automatic int unsigned loop_latency(int unsigned delay_h,
                                               int unsigned delay_s);
    return delay_s + delay_h + 1;
  endfunction

endpackage
