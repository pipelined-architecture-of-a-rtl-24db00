// prng_model_pkg: reference model of the FDNR chaotic generator for the
// testbenches. Values are kept as 64-bit signed integers holding a
// sign-extended W-bit fixed-point number (W <= 64, 4 integer bits sign
// included), and every operation is re-wrapped to W bits, so the model
// matches a W-bit two's-complement datapath. It is written from the
// equations, not from the RTL:
//   X' = X + floor(Y/16)
//   Y' = Y + floor(Z/16)
//   Z' = Z - floor((Z + BY + X)/16),  BY = 4*Y if Y >= 1.0 else 0
package prng_model_pkg;

  typedef struct {
    longint x;
    longint y;
    longint z;
  } state_t;

  // Sign-extend the low w bits of v.
  function automatic longint wrap(longint v, int w);
    longint m;
    if (w >= 64) return v;
    m = longint'(1) <<< w;
    v = v & (m - 1);
    if (v >= (m >>> 1)) v = v - m;
    return v;
  endfunction

  // floor(v / 2^k) computed by division, not by shifting.
  function automatic longint floor_div_pow2(longint v, int k);
    longint d = longint'(1) <<< k;
    longint q = v / d;            // truncates towards zero
    if ((v % d) != 0 && v < 0) q = q - 1;
    return q;
  endfunction

  function automatic longint fdnr_by(longint y, int w);
    longint one = longint'(1) <<< (w - 4);
    if (y >= one) return wrap(y * 4, w);
    return 0;
  endfunction

  function automatic state_t step(state_t s, int w);
    state_t n;
    longint sum;
    sum = wrap(wrap(s.z + fdnr_by(s.y, w), w) + s.x, w);
    n.x = wrap(s.x + floor_div_pow2(s.y, 4), w);
    n.y = wrap(s.y + floor_div_pow2(s.z, 4), w);
    n.z = wrap(s.z - floor_div_pow2(sum, 4), w);
    return n;
  endfunction

  // A random seed in the range (-2, 2) as a w-bit fixed-point number.
  function automatic longint rand_seed(int w);
    longint r;
    r = {$urandom, $urandom};
    return floor_div_pow2(r, 2 + (64 - w));
  endfunction

endpackage
