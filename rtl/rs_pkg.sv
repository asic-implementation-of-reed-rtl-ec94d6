// rs_pkg: field arithmetic and code constants shared by the Reed-Solomon codec.
//
// Symbols are elements of GF(2^8) in polynomial basis. Addition is XOR;
// multiplication is a carry-less product reduced modulo the field polynomial
// i(x) = x^8 + x^4 + x^3 + x^2 + 1 (0x11D). The code is the shortened RS(208,200)
// with t = 4, which is the configuration this codec is built for. The field
// polynomial and the first generator root (RS_FCR = 1) are choices of this design;
// neither changes the size or speed of the hardware.
//
// The functions below are used both at elaboration (to build constant tables
// such as generator coefficients and Chien step constants) and in logic, where
// they unroll into AND-XOR networks.
package rs_pkg;

  parameter int unsigned M      = 8;          // bits per symbol
  parameter logic [8:0]  POLY   = 9'h11D;     // field polynomial i(x)
  parameter int unsigned NFIELD = (1 << M) - 1; // multiplicative group order, 255
  parameter int unsigned RS_N    = 208;        // codeword length
  parameter int unsigned RS_K    = 200;        // message length
  parameter int unsigned RS_NSYM = RS_N - RS_K;     // parity symbols, 2t
  parameter int unsigned RS_T    = RS_NSYM / 2;  // correctable symbol errors
  parameter int unsigned RS_FCR  = 1;        // g(x) roots are alpha^FCR .. alpha^(FCR+2t-1)

  typedef logic [M-1:0] sym_t;

  // Product of two field elements: shift-and-add with reduction at each step.
  function automatic sym_t gf_mul(input sym_t a, input sym_t b);
    sym_t p  = '0;
    sym_t aa = a;
    for (int i = 0; i < M; i++) begin
      if (b[i]) p = p ^ aa;
      aa = aa[M-1] ? ((aa << 1) ^ POLY[M-1:0]) : (aa << 1);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^(2^M - 2) = a^2 * a^4 * ... * a^(2^(M-1)).
  // Maps 0 to 0.
  function automatic sym_t gf_inv(input sym_t a);
    sym_t sq = a;
    sym_t r  = sym_t'(1);
    for (int i = 1; i < M; i++) begin
      sq = gf_mul(sq, sq);
      r  = gf_mul(r, sq);
    end
    return r;
  endfunction

  // alpha^e for any integer e (negative exponents allowed); alpha = x = 8'h02.
  function automatic sym_t gf_alpha_pow(input int e);
    int   ee = e % int'(NFIELD);
    sym_t r  = sym_t'(1);
    if (ee < 0) ee = ee + int'(NFIELD);
    for (int i = 0; i < ee; i++) r = gf_mul(r, sym_t'(2));
    return r;
  endfunction

endpackage
