// Shared constants and arithmetic helpers for the integer-FFT (NTT) multiplier.
//
// All transform arithmetic is done modulo the Solinas prime p = 2^64 - 2^32 + 1,
// which has 2^32-th roots of unity, so every power-of-two FFT size used here has
// an exact integer transform. The functions below are combinational helpers used
// by the butterfly, the point-wise multiplier and the twiddle-table generators;
// mod_mul_const is meant for elaboration-time table building only.
package fhe_pkg;

  typedef logic [63:0] fe_t;  // one field element, always kept in [0, p)

  localparam fe_t P = 64'hFFFF_FFFF_0000_0001;
  // 7 generates the multiplicative group of GF(p); w_k = 7^((p-1)/k).
  localparam fe_t GEN = 64'd7;

  // Kind of inner iteration travelling with a frame through the integer-FFT
  // datapath (see lowlat_ctrl): the first of an outer iteration (x0 * y_i only),
  // an ordinary one (two block products), or the final flush of the left third.
  typedef enum logic [1:0] {IT_FIRST = 2'd0, IT_NORMAL = 2'd1, IT_FLUSH = 2'd2} iter_kind_e;

  // (a + b) mod p for a, b in [0, p)
  function automatic fe_t mod_add(fe_t a, fe_t b);
    logic [64:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= {1'b0, P}) s = s - {1'b0, P};
    return s[63:0];
  endfunction

  // (a - b) mod p for a, b in [0, p)
  function automatic fe_t mod_sub(fe_t a, fe_t b);
    logic [64:0] d;
    d = {1'b0, a} - {1'b0, b};
    if (a < b) d = d + {1'b0, P};
    return d[63:0];
  endfunction

  // Solinas reduction of a 128-bit value: with x = 2^96 a + 2^64 b + 2^32 c + d,
  // x = 2^32 (b + c) - a - b + d (mod p), a value in (-p, 2p).
  function automatic fe_t solinas(logic [127:0] x);
    logic signed [67:0] r;
    logic [31:0] a, b, c, d;
    {a, b, c, d} = x;
    r = (68'(b) + 68'(c)) * 68'sd4294967296 - 68'(a) - 68'(b) + 68'(d);
    if (r < 0)                 r = r + 68'(P);
    else if (r >= 68'(P))      r = r - 68'(P);
    return r[63:0];
  endfunction

  function automatic fe_t mod_mul_const(fe_t a, fe_t b);
    return solinas(128'(a) * 128'(b));
  endfunction

  function automatic fe_t mod_pow_const(fe_t base, logic [63:0] e);
    fe_t r, bb;
    r  = 64'd1;
    bb = base;
    for (int i = 0; i < 64; i++) begin
      if (e[i]) r = mod_mul_const(r, bb);
      bb = mod_mul_const(bb, bb);
    end
    return r;
  endfunction

  // a / 2 mod p
  function automatic fe_t mod_half(fe_t a);
    logic [64:0] t;
    t = a[0] ? ({1'b0, a} + {1'b0, P}) : {1'b0, a};
    return t[64:1];
  endfunction

  // bit-reverse the low `bits` bits of v (bits <= 16)
  function automatic int unsigned bitrev(int unsigned v, int unsigned bits);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < bits; i++) r |= ((v >> i) & 1) << (bits - 1 - i);
    return r;
  endfunction

endpackage
