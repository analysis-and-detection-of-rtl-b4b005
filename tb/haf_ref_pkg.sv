// haf_ref_pkg: behavioural reference of HaF-256 for the testbenches.
//
// Written independently of the RTL, in plain integer arithmetic: the
// multiplication mod 2^16+1 uses the % operator on 64-bit integers, the
// polynomial multiplication a shift-and-add loop that reduces after every
// shift, rotations use concatenation. Only the constants of haf_pkg are
// shared with the design.
package haf_ref_pkg;
  import haf_pkg::*;

  typedef logic [15:0] w16_t;
  typedef logic [0:15][15:0] state_t;

  function automatic w16_t ref_rotl16(w16_t x, int unsigned t);
    logic [31:0] d;
    d = {x, x};
    return d[31 - (t % 16) -: 16];
  endfunction

  function automatic w16_t ref_mulmod(w16_t a, w16_t b);
    longint unsigned aa, bb, r;
    aa = (a == 0) ? 64'd65536 : 64'(a);
    bb = (b == 0) ? 64'd65536 : 64'(b);
    r  = (aa * bb) % 65537;
    return (r == 65536) ? 16'h0000 : w16_t'(r);
  endfunction

  function automatic w16_t ref_gfmul(w16_t a, w16_t b);
    w16_t p, x;
    logic hi;
    p = '0; x = a;
    for (int i = 0; i < 16; i++) begin
      if (b[i]) p ^= x;
      hi = x[15];
      x  = x << 1;
      if (hi) x ^= HAF_RPOLY[15:0];
    end
    return p;
  endfunction

  function automatic w16_t ref_sbox(int unsigned j, w16_t x);
    w16_t y;
    for (int k = 0; k < 4; k++)
      y[4*k +: 4] = haf_sbox4((j + k) % 4, x[4*k +: 4]);
    return y;
  endfunction

  // new A15 of step j
  function automatic w16_t ref_f(int unsigned j, state_t a);
    w16_t x, y, z;
    x = ref_gfmul(HAF_ALPHA0, a[0]) ^ ref_gfmul(HAF_ALPHA2, a[2]) ^
        ref_gfmul(HAF_ALPHA3, a[3]) ^ ref_gfmul(HAF_ALPHA5, a[5]);
    y = ref_mulmod(a[1] + a[6], a[5] ^ a[7]) ^ a[8];
    z = (a[9] + a[11] + a[14]) ^ ref_rotl16(HAF_C, j);
    return (ref_sbox(j, z) + y) ^ x;
  endfunction

  function automatic state_t ref_step(int unsigned j, state_t a);
    state_t o;
    for (int r = 0; r < 15; r++) o[r] = a[r+1];
    o[9]  = ref_rotl16(a[10], HAF_ROT10);
    o[15] = ref_f(j, a);
    return o;
  endfunction

  function automatic logic [255:0] ref_rotl256(logic [255:0] v, int unsigned t);
    logic [255:0] r;
    r = v;
    for (int i = 0; i < int'(t); i++) r = {r[254:0], r[255]};
    return r;
  endfunction

  function automatic logic [255:0] ref_compress(logic [255:0] h, logic [255:0] m, logic [255:0] s);
    logic [255:0] n, ns, hh;
    state_t a, f;
    n  = m ^ s;
    hh = h;
    for (int l = 0; l < 2; l++) begin
      ns = ref_rotl256(n, int'(n[3:0]));
      a  = hh ^ ns;
      for (int j = 0; j < 16; j++) a = ref_step(j, a);
      n  = a;      // permutation before round 2
      hh = ns;
    end
    for (int r = 0; r < 16; r++) f[r] = a[r] + h[255 - 16*r -: 16];
    return f;
  endfunction
endpackage
