// gf2m_ref_pkg: reference arithmetic for the testbenches.
// gf_mul computes A*B mod P for the monic polynomial
// P(x) = x^m + sum p_j x^j by a full carry-less product of degree up to
// 2m-2 followed by long division from the top bit down, which is a different
// ordering from the interleaved shift-and-reduce the hardware performs.
// Operands up to REF_W bits (m <= 255).
package gf2m_ref_pkg;

  localparam int REF_W = 512;
  typedef logic [REF_W-1:0] wide_t;

  function automatic wide_t gf_mul(input wide_t a, input wide_t b, input wide_t p,
                                   input int m);
    wide_t prod;
    wide_t pfull;
    prod = '0;
    for (int i = 0; i < m; i++) begin
      if (a[i]) prod ^= (b << i);
    end
    pfull = p;
    pfull[m] = 1'b1;
    for (int d = 2 * m - 2; d >= m; d--) begin
      if (prod[d]) prod ^= (pfull << (d - m));
    end
    for (int d = m; d < REF_W; d++) prod[d] = 1'b0;
    return prod;
  endfunction

  // Random m-bit value.
  function automatic wide_t rand_bits(input int m);
    wide_t v;
    for (int w = 0; w < REF_W / 32; w++) v[w*32 +: 32] = $urandom;
    for (int d = m; d < REF_W; d++) v[d] = 1'b0;
    return v;
  endfunction

endpackage
