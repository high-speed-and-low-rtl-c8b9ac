// sha_ref_pkg: plain software-style reference model of SHA-256 and of
// single-block HMAC-SHA256, used by the testbenches to compute expected
// values. One operation per loop iteration, straight from FIPS 180-4; the
// constants are typed here independently of the RTL package.
package sha_ref_pkg;

  typedef logic [31:0] w32;

  function automatic w32 rr(w32 x, int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic w32 kc(int i);
    w32 k [64] = '{
      32'h428a2f98, 32'h71374491, 32'hb5c0fbcf, 32'he9b5dba5, 32'h3956c25b, 32'h59f111f1, 32'h923f82a4, 32'hab1c5ed5,
      32'hd807aa98, 32'h12835b01, 32'h243185be, 32'h550c7dc3, 32'h72be5d74, 32'h80deb1fe, 32'h9bdc06a7, 32'hc19bf174,
      32'he49b69c1, 32'hefbe4786, 32'h0fc19dc6, 32'h240ca1cc, 32'h2de92c6f, 32'h4a7484aa, 32'h5cb0a9dc, 32'h76f988da,
      32'h983e5152, 32'ha831c66d, 32'hb00327c8, 32'hbf597fc7, 32'hc6e00bf3, 32'hd5a79147, 32'h06ca6351, 32'h14292967,
      32'h27b70a85, 32'h2e1b2138, 32'h4d2c6dfc, 32'h53380d13, 32'h650a7354, 32'h766a0abb, 32'h81c2c92e, 32'h92722c85,
      32'ha2bfe8a1, 32'ha81a664b, 32'hc24b8b70, 32'hc76c51a3, 32'hd192e819, 32'hd6990624, 32'hf40e3585, 32'h106aa070,
      32'h19a4c116, 32'h1e376c08, 32'h2748774c, 32'h34b0bcb5, 32'h391c0cb3, 32'h4ed8aa4a, 32'h5b9cca4f, 32'h682e6ff3,
      32'h748f82ee, 32'h78a5636f, 32'h84c87814, 32'h8cc70208, 32'h90befffa, 32'ha4506ceb, 32'hbef9a3f7, 32'hc67178f2};
    return k[i];
  endfunction

  localparam logic [255:0] REF_IV = 256'h6a09e667bb67ae853c6ef372a54ff53a510e527f9b05688c1f83d9ab5be0cd19;

  // message schedule word t of a block
  function automatic w32 sched(logic [511:0] blk, int t);
    w32 w [64];
    for (int i = 0; i < 16; i++) w[i] = blk[511-32*i -: 32];
    for (int i = 16; i < 64; i++)
      w[i] = (rr(w[i-2],17) ^ rr(w[i-2],19) ^ (w[i-2] >> 10)) + w[i-7] +
             (rr(w[i-15],7) ^ rr(w[i-15],18) ^ (w[i-15] >> 3)) + w[i-16];
    return w[t];
  endfunction

  // one operation on state {a..h} packed a in [255:224]
  function automatic logic [255:0] op1(logic [255:0] s, w32 k, w32 w);
    w32 a, b, c, d, e, f, g, h, t1, t2;
    {a, b, c, d, e, f, g, h} = s;
    t1 = h + (rr(e,6) ^ rr(e,11) ^ rr(e,25)) + ((e & f) ^ (~e & g)) + k + w;
    t2 = (rr(a,2) ^ rr(a,13) ^ rr(a,22)) + ((a & b) ^ (a & c) ^ (b & c));
    return {t1 + t2, a, b, c, d + t1, e, f, g};
  endfunction

  function automatic logic [255:0] compress(logic [255:0] hv, logic [511:0] blk);
    logic [255:0] s;
    logic [255:0] r;
    s = hv;
    for (int t = 0; t < 64; t++) s = op1(s, kc(t), sched(blk, t));
    for (int i = 0; i < 8; i++) r[255-32*i -: 32] = hv[255-32*i -: 32] + s[255-32*i -: 32];
    return r;
  endfunction

  // pad a message of nbits (< 448) left-aligned, total length nbits+offset
  function automatic logic [511:0] pad(logic [511:0] m, int nbits, int offset);
    logic [511:0] b;
    b = '0;
    for (int i = 0; i < nbits; i++) b[511-i] = m[511-i];
    b[511-nbits] = 1'b1;
    b[63:0] = 64'(nbits + offset);
    return b;
  endfunction

  function automatic logic [255:0] hmac(logic [511:0] key, logic [511:0] m, int nbits);
    logic [255:0] inner;
    inner = compress(compress(REF_IV, key ^ {64{8'h36}}), pad(m, nbits, 512));
    return compress(compress(REF_IV, key ^ {64{8'h5c}}), pad({inner, 256'b0}, 256, 512));
  endfunction

  function automatic logic [511:0] rand_block();
    logic [511:0] b;
    for (int i = 0; i < 16; i++) b[32*i +: 32] = $urandom;
    return b;
  endfunction

endpackage
