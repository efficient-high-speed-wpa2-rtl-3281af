// sha1_pkg: types, constants and helper functions of the SHA-1 compression
// function (FIPS 180-4) shared by the round stage, the 83-stage pipeline and
// the WPA2 verifier.
//
// The round function f_t, the round constants K_t, the message schedule
// rule W_t = rol1(W_{t-3} ^ W_{t-8} ^ W_{t-14} ^ W_{t-16}) and the initial
// chaining value are those of the standard SHA-1 that the design implements.
// Words are big-endian: word 0 of a 512-bit block is bits [511:480], and
// word A of a 160-bit chaining value is bits [159:128].
package sha1_pkg;

  typedef logic [31:0]  word_t;
  typedef logic [159:0] digest_t;
  typedef logic [511:0] block_t;

  // Working state of one round: the five words A..E.
  typedef struct packed {
    word_t a;
    word_t b;
    word_t c;
    word_t d;
    word_t e;
  } state_t;

  // Standard SHA-1 initial chaining value H0..H4.
  localparam digest_t SHA1_IV = 160'h67452301_EFCDAB89_98BADCFE_10325476_C3D2E1F0;

  localparam int unsigned ROUNDS = 80;

  function automatic word_t rol(input word_t x, input int unsigned n);
    return (x << n) | (x >> (32 - n));
  endfunction

  // Round constant K_t.
  function automatic word_t k_of(input int unsigned t);
    if (t < 20)      return 32'h5A827999;
    else if (t < 40) return 32'h6ED9EBA1;
    else if (t < 60) return 32'h8F1BBCDC;
    else             return 32'hCA62C1D6;
  endfunction

  // Round function f_t(x, y, z): choose, parity, majority, parity.
  function automatic word_t f_of(input int unsigned t, input word_t x, input word_t y,
                                 input word_t z);
    if (t < 20)      return (x & y) ^ (~x & z);
    else if (t < 40) return x ^ y ^ z;
    else if (t < 60) return (x & y) ^ (x & z) ^ (y & z);
    else             return x ^ y ^ z;
  endfunction

  // Word i (0 = most significant) of a 512-bit block.
  function automatic word_t block_word(input block_t blk, input int unsigned i);
    return blk[511 - 32*i -: 32];
  endfunction

  function automatic state_t to_state(input digest_t d);
    return state_t'(d);
  endfunction

  // Final feed-forward: chaining value plus round result, word by word.
  function automatic digest_t add_digest(input digest_t h, input state_t s);
    digest_t r;
    r[159:128] = h[159:128] + s.a;
    r[127:96]  = h[127:96]  + s.b;
    r[95:64]   = h[95:64]   + s.c;
    r[63:32]   = h[63:32]   + s.d;
    r[31:0]    = h[31:0]    + s.e;
    return r;
  endfunction

endpackage
