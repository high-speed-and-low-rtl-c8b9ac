// sha256_pkg: types, constants and word functions shared by the SHA-256 /
// HMAC datapath.
//
// The working state a..h of one SHA-256 hash is held as a struct of eight
// 32-bit words. The round constants K_t and the standard initial hash value
// are those of the Secure Hash Standard (FIPS 180-4); the logical functions
// Ch, Maj, Sigma0/1 (compression) and sigma0/1 (message schedule) are the
// standard ones. Nothing here is stateful.
package sha256_pkg;

  typedef logic [31:0]  word_t;
  typedef logic [511:0] block_t;   // one 512-bit message block, word 0 in [511:480]
  typedef logic [255:0] digest_t;  // H0 in [255:224] ... H7 in [31:0]

  typedef struct packed {
    word_t a, b, c, d, e, f, g, h;
  } state_t;

  // Number of operations (rounds) per hash, pipeline stages, operations per cycle.
  localparam int unsigned NUM_OPS        = 64;
  localparam int unsigned NUM_STAGES     = 4;
  localparam int unsigned OPS_PER_CYCLE  = 2;
  localparam int unsigned CYC_PER_STAGE  = NUM_OPS / NUM_STAGES / OPS_PER_CYCLE; // 8

  localparam word_t K [64] = '{
    32'h428a2f98, 32'h71374491, 32'hb5c0fbcf, 32'he9b5dba5, 32'h3956c25b, 32'h59f111f1, 32'h923f82a4, 32'hab1c5ed5,
    32'hd807aa98, 32'h12835b01, 32'h243185be, 32'h550c7dc3, 32'h72be5d74, 32'h80deb1fe, 32'h9bdc06a7, 32'hc19bf174,
    32'he49b69c1, 32'hefbe4786, 32'h0fc19dc6, 32'h240ca1cc, 32'h2de92c6f, 32'h4a7484aa, 32'h5cb0a9dc, 32'h76f988da,
    32'h983e5152, 32'ha831c66d, 32'hb00327c8, 32'hbf597fc7, 32'hc6e00bf3, 32'hd5a79147, 32'h06ca6351, 32'h14292967,
    32'h27b70a85, 32'h2e1b2138, 32'h4d2c6dfc, 32'h53380d13, 32'h650a7354, 32'h766a0abb, 32'h81c2c92e, 32'h92722c85,
    32'ha2bfe8a1, 32'ha81a664b, 32'hc24b8b70, 32'hc76c51a3, 32'hd192e819, 32'hd6990624, 32'hf40e3585, 32'h106aa070,
    32'h19a4c116, 32'h1e376c08, 32'h2748774c, 32'h34b0bcb5, 32'h391c0cb3, 32'h4ed8aa4a, 32'h5b9cca4f, 32'h682e6ff3,
    32'h748f82ee, 32'h78a5636f, 32'h84c87814, 32'h8cc70208, 32'h90befffa, 32'ha4506ceb, 32'hbef9a3f7, 32'hc67178f2
  };

  localparam digest_t IV = {
    32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a,
    32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19
  };

  function automatic word_t rotr(word_t x, int unsigned n);
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic word_t ch(word_t e, word_t f, word_t g);
    return (e & f) ^ (~e & g);
  endfunction

  function automatic word_t maj(word_t a, word_t b, word_t c);
    return (a & b) ^ (a & c) ^ (b & c);
  endfunction

  function automatic word_t bsig0(word_t x);
    return rotr(x, 2) ^ rotr(x, 13) ^ rotr(x, 22);
  endfunction

  function automatic word_t bsig1(word_t x);
    return rotr(x, 6) ^ rotr(x, 11) ^ rotr(x, 25);
  endfunction

  function automatic word_t ssig0(word_t x);
    return rotr(x, 7) ^ rotr(x, 18) ^ (x >> 3);
  endfunction

  function automatic word_t ssig1(word_t x);
    return rotr(x, 17) ^ rotr(x, 19) ^ (x >> 10);
  endfunction

  function automatic state_t digest_to_state(digest_t d);
    return state_t'(d);
  endfunction

  // Final addition of the working state to the chaining value.
  function automatic digest_t add_state(digest_t h, state_t s);
    digest_t r;
    state_t  hv;
    hv = state_t'(h);
    r = {hv.a + s.a, hv.b + s.b, hv.c + s.c, hv.d + s.d,
         hv.e + s.e, hv.f + s.f, hv.g + s.g, hv.h + s.h};
    return r;
  endfunction

endpackage
