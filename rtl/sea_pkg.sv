// sea_pkg: shared constants and helpers for the SEA (Scalable Encryption
// Algorithm) loop core.
//
// SEA(n,b) encrypts an n-bit block with an n-bit key. Each half block is
// made of NB = n/(2b) words of b bits; word 0 is the least significant word.
// The S box works on groups of three words, so NB must be a multiple of 3.
//
// sea_default_nr() gives the number of rounds used when the integrator does
// not choose one: nr = 3n/4 + 2*(NB + b/2), the recommended round count.
// 3n/4 is rounded up when n is not a multiple of 4, and the result is then
// rounded up to the next odd number. The odd round count is this design's
// own requirement: with an odd nr the round-key sequence is symmetric, so the
// same key schedule, started from the same key, serves decryption too.
package sea_pkg;

  // Recommended round count, rounded up to an odd number (see above).
  function automatic int sea_default_nr(input int n, input int b);
    int nr;
    nr = (3 * n + 3) / 4 + 2 * (n / (2 * b) + b / 2);
    return nr | 1;
  endfunction

  // Width of a round counter that counts 0..nr.
  function automatic int sea_cnt_w(input int nr);
    return $clog2(nr + 1);
  endfunction

endpackage
