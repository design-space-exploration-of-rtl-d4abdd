// nb_pkg: Galois-field helpers for the non-binary FFT-SPA decoder. Symbols of
// GF(2^m) are m-bit vectors in polynomial basis; multiplication is carry-less
// multiplication reduced by a primitive polynomial (x^2+x+1, x^3+x+1 or
// x^4+x+1 for m = 2, 3, 4; the standard choices, picked by this design).
// Probabilities are unsigned fixed point with PROB_FRAC fractional bits (1.0
// = 2^15); transformed (Fourier-domain) values are signed with the same
// scale, stored in FW-bit words.
package nb_pkg;

  localparam int unsigned PROB_FRAC = 15;

  function automatic int unsigned prim_poly(input int unsigned m);
    case (m)
      2:       return 'b111;
      3:       return 'b1011;
      4:       return 'b10011;
      5:       return 'b100101;
      6:       return 'b1000011;
      default: return 'b10011;
    endcase
  endfunction

  function automatic int unsigned gf_mul(input int unsigned a, input int unsigned b,
                                         input int unsigned m);
    int unsigned r, aa;
    r  = 0;
    aa = a;
    for (int i = 0; i < m; i++) begin
      if (b[i]) r ^= aa;
      aa = aa << 1;
      if (aa[m]) aa ^= prim_poly(m);
    end
    return r;
  endfunction

  function automatic int unsigned gf_inv(input int unsigned a, input int unsigned m);
    int unsigned r;
    r = 0;
    for (int unsigned x = 1; x < (1 << m); x++) begin
      if (gf_mul(a, x, m) == 1) r = x;
    end
    return r;
  endfunction

endpackage
