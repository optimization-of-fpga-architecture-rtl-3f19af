// lut_sr_pkg: constants and helpers shared by the LUT-SR random number generator.
//
// A LUT-SR generator is fully described by a 5-tuple (n, r, t, k, s): state bits, output bits
// per cycle, XOR gate input count, maximum shift-register length and a free parameter that
// selects one generator of the family. The connections of a generator are derived from s at
// elaboration time by a small pseudo-random construction. This package holds the pseudo-random
// source of that construction and the plan limits; the construction itself lives in
// lut_sr_rng, where the sizes are known.
//
// The source is a 32-bit linear congruential generator x' = 1664525*x + 1013904223 (mod 2^32).
// A draw below m uses bits [31:8] of the new value, reduced modulo m. Both the recurrence and
// the draw rule are this design's own choice; any change to them selects different generators
// for the same s, so the default s of lut_sr_rng must be re-validated after such a change.
package lut_sr_pkg;

  typedef logic [31:0] word_t;

  localparam word_t LCG_MUL = 32'd1664525;
  localparam word_t LCG_ADD = 32'd1013904223;

  // Next state of the construction's pseudo-random source.
  function automatic word_t lcg_next(word_t x);
    return x * LCG_MUL + LCG_ADD;
  endfunction

  // Value in [0, m) taken from a freshly advanced source state.
  function automatic int unsigned draw_below(word_t x, int unsigned m);
    return int'((x >> 8) % m);
  endfunction

endpackage
