// gf_mult: bit-parallel GF(2^8) multiplier built as an AND-XOR network.
//
// Stage 1 forms the 15-bit carry-less product of a and b: bit k is the XOR of
// the ANDs a[i] & b[k-i]. Stage 2 folds the bits of degree 8..14 back into the
// low byte with the fixed reduction matrix of the field polynomial i(x), which
// is precomputed as x^j mod i(x) for each high degree j. The result is purely
// combinational, no clock. The AND-XOR structure is the one the codec
// description calls for; the two-stage split and the field polynomial (taken
// from rs_pkg) are this design's choices.
module gf_mult
  import rs_pkg::*;
(
  input  sym_t a,
  input  sym_t b,
  output sym_t p
);

  localparam int unsigned PW = 2 * M - 1;

  // x^j mod i(x) for j = 0 .. 2M-2
  function automatic sym_t xpow_mod(input int j);
    sym_t r = sym_t'(1);
    for (int i = 0; i < j; i++) r = r[M-1] ? ((r << 1) ^ POLY[M-1:0]) : (r << 1);
    return r;
  endfunction

  logic [PW-1:0] prod;

  always_comb begin
    prod = '0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++)
        prod[i+j] = prod[i+j] ^ (a[i] & b[j]);
  end

  always_comb begin
    p = prod[M-1:0];
    for (int j = M; j < PW; j++)
      if (prod[j]) p = p ^ xpow_mod(j);
  end

endmodule
