// sha256_op2: two consecutive SHA-256 operations merged into one
// combinational block (the "transformation round" of one pipeline stage).
//
// The block takes the state at step t-2 and produces the state at step t.
// It follows the merged structure: of the outputs only a and e need real
// arithmetic, the other six are copies (b_t=a_{t-1}, c_t=a_{t-2},
// d_t=b_{t-2}, f_t=e_{t-1}, g_t=e_{t-2}, h_t=f_{t-2}). The terms of T1 that
// depend only on the block inputs are formed in parallel for both
// operations: h_{t-2}+K_{t-2}+W_{t-2} for the first and, since
// h_{t-1}=g_{t-2}, g_{t-2}+K_{t-1}+W_{t-1} for the second, and the d (resp.
// c) term of the new e is added to them in the same precomputation. Written
// this way the chain to the new e is six two-input adders and the chain to
// the new a is seven; a single operation needs four. Two operations
// complete per clock cycle.
//
// Interface: st_i (state t-2), k0_i/w0_i (K,W for operation t-2),
// k1_i/w1_i (K,W for operation t-1), st_o (state t). Purely combinational.
module sha256_op2
  import sha256_pkg::*;
(
  input  state_t st_i,
  input  word_t  k0_i,
  input  word_t  w0_i,
  input  word_t  k1_i,
  input  word_t  w1_i,
  output state_t st_o
);

  word_t kw0, kw1, hkw0, gkw1, dhkw0, cgkw1;   // input-only terms
  word_t cs0, t2_0, a1, e1;
  word_t cs1, t2_1;

  always_comb begin
    // precomputation: depends on the block inputs only, both operations
    kw0   = k0_i + w0_i;
    kw1   = k1_i + w1_i;
    hkw0  = st_i.h + kw0;
    gkw1  = st_i.g + kw1;          // h_{t-1} = g_{t-2}
    dhkw0 = st_i.d + hkw0;
    cgkw1 = st_i.c + gkw1;         // d_{t-1} = c_{t-2}
    // first operation
    cs0  = ch(st_i.e, st_i.f, st_i.g) + bsig1(st_i.e);
    t2_0 = bsig0(st_i.a) + maj(st_i.a, st_i.b, st_i.c);
    e1   = dhkw0 + cs0;
    a1   = (hkw0 + cs0) + t2_0;
    // second operation, on (a1, a, b, c, e1, e, f, g)
    cs1  = ch(e1, st_i.e, st_i.f) + bsig1(e1);
    t2_1 = bsig0(a1) + maj(a1, st_i.a, st_i.b);
    st_o.a = gkw1 + (cs1 + t2_1);
    st_o.b = a1;
    st_o.c = st_i.a;
    st_o.d = st_i.b;
    st_o.e = cgkw1 + cs1;
    st_o.f = e1;
    st_o.g = st_i.e;
    st_o.h = st_i.f;
  end

endmodule
