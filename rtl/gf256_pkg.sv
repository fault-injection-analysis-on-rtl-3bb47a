// gf256_pkg: arithmetic in GF(2^8) shared by the Reed-Solomon decoder and
// its checkers.
//
// Elements are bytes in polynomial basis; the field is built on the
// primitive polynomial x^8 + x^4 + x^3 + x^2 + 1 (0x11D), with alpha = 0x02
// a primitive element. The document only says that alpha is primitive; the
// choice of polynomial is this design's (it is the usual one for
// RS(255,239)). All functions are purely combinational and synthesizable:
// a multiply is an 8x8 carry-less product reduced modulo the polynomial, an
// inverse is a^254 by repeated squaring, and alpha_pow is meant for
// elaboration-time constants.
package gf256_pkg;

  localparam int unsigned GF_M = 8;
  localparam logic [8:0]  GF_PRIM = 9'h11D;

  typedef logic [GF_M-1:0] gf_t;

  // Product a*b in GF(2^8).
  function automatic gf_t gf_mul(input gf_t a, input gf_t b);
    logic [GF_M-1:0] acc;
    logic [GF_M-1:0] sh;
    acc = '0;
    sh  = a;
    for (int i = 0; i < GF_M; i++) begin
      if (b[i]) acc = acc ^ sh;
      // sh <= sh * x mod prim
      sh = sh[GF_M-1] ? ({sh[GF_M-2:0], 1'b0} ^ GF_PRIM[GF_M-1:0]) : {sh[GF_M-2:0], 1'b0};
    end
    return acc;
  endfunction

  // alpha^e, e taken modulo 255, by square and multiply.
  function automatic gf_t alpha_pow(input int e);
    gf_t r;
    gf_t sq;
    int  k;
    k = e % 255;
    if (k < 0) k = k + 255;
    r  = 8'h01;
    sq = 8'h02;
    for (int i = 0; i < GF_M; i++) begin
      if (k[i]) r = gf_mul(r, sq);
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  // Multiplicative inverse a^-1 = a^254 (returns 0 for a = 0).
  function automatic gf_t gf_inv(input gf_t a);
    gf_t sq;
    gf_t r;
    // 254 = 0b11111110: product of a^2, a^4, ..., a^128
    sq = a;
    r  = 8'h01;
    for (int i = 1; i < GF_M; i++) begin
      sq = gf_mul(sq, sq);
      r  = gf_mul(r, sq);
    end
    return r;
  endfunction

endpackage
