// model_rand_pkg: repeatable pseudo-random numbers for the behavioural
// models of the analog front end (behavioural, not synthesizable).
//
// A 32-bit linear congruential generator gives uniform numbers in [0,1);
// the sum of twelve of them minus six approximates a unit Gaussian, which is
// how capacitor mismatch, comparator offsets and thermal noise are drawn.
// Each caller keeps its own generator state, so a given seed always gives the
// same converter.
package model_rand_pkg;

  function automatic real urand(inout int unsigned state);
    state = state * 32'd1664525 + 32'd1013904223;
    return real'(longint'(state)) / 4294967296.0;
  endfunction

  function automatic real gauss(inout int unsigned state);
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += urand(state);
    return s - 6.0;
  endfunction

endpackage
