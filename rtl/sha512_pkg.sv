// sha512_pkg -- types, constants and bit-level functions shared by the
// SHA-512 core and its wrapper.
//
// The functions are the ones of the SHA-512 definition (FIPS 180-4): the
// big sigmas used on the working variables a and e, the small sigmas of the
// message schedule, and the choose/majority functions. The initial hash value
// H(0) is the standard one; the same values appear as H0..H7 at the start of
// the reference simulation of the core. Everything here is pure combinational
// logic with no timing of its own.
package sha512_pkg;

  typedef logic [63:0] word_t;
  typedef word_t [7:0] state_t;      // element i = H_i or working var (a=0 .. h=7)

  localparam int unsigned ROUNDS      = 80;

  localparam state_t IV = '{
    7: 64'h5be0cd19137e2179,
    6: 64'h1f83d9abfb41bd6b,
    5: 64'h9b05688c2b3e6c1f,
    4: 64'h510e527fade682d1,
    3: 64'ha54ff53a5f1d36f1,
    2: 64'h3c6ef372fe94f82b,
    1: 64'hbb67ae8584caa73b,
    0: 64'h6a09e667f3bcc908
  };

  function automatic word_t rotr(input word_t x, input int unsigned n);
    return (x >> n) | (x << (64 - n));
  endfunction

  function automatic word_t big_sigma0(input word_t x);
    return rotr(x, 28) ^ rotr(x, 34) ^ rotr(x, 39);
  endfunction

  function automatic word_t big_sigma1(input word_t x);
    return rotr(x, 14) ^ rotr(x, 18) ^ rotr(x, 41);
  endfunction

  function automatic word_t small_sigma0(input word_t x);
    return rotr(x, 1) ^ rotr(x, 8) ^ (x >> 7);
  endfunction

  function automatic word_t small_sigma1(input word_t x);
    return rotr(x, 19) ^ rotr(x, 61) ^ (x >> 6);
  endfunction

  function automatic word_t ch(input word_t x, input word_t y, input word_t z);
    return (x & y) ^ (~x & z);
  endfunction

  function automatic word_t maj(input word_t x, input word_t y, input word_t z);
    return (x & y) ^ (x & z) ^ (y & z);
  endfunction

endpackage
