// ant_ref_pkg: reference models used by the ANT multiplier testbenches.
//
// rpr_ref computes the compensated fixed-width replica estimate from its definition,
// by a route different from the RTL: it takes the exact product of the operand MSBs,
// subtracts the bits below the kept part, and adds beta = popcount(ICV), plus one when
// beta = 0 and the MICV holds at least one set bit. h is the replica word length;
// the result is in units of 2^(2N-h) of the N x N product.
package ant_ref_pkg;

  function automatic longint unsigned rpr_ref(input int unsigned h, input longint unsigned xh,
                                              input longint unsigned yh);
    longint unsigned full, low, msp;
    int unsigned beta, beta1;
    full  = xh * yh;
    low   = 0;
    beta  = 0;
    beta1 = 0;
    for (int unsigned a = 0; a < h; a++)
      for (int unsigned b = 0; b < h; b++) begin
        if (xh[a] && yh[b]) begin
          if (a + b < h) low += 64'd1 << (a + b);
          if (a + b == h - 1) beta++;
          if (a + b == h - 2) beta1++;
        end
      end
    msp = (full - low) >> h;
    return msp + 64'(beta) + ((beta == 0 && beta1 > 0) ? 64'd1 : 64'd0);
  endfunction

  // Replica estimate of the N x N product x * y on the 2N-bit scale.
  function automatic longint unsigned rpr_product(input int unsigned n, input int unsigned h,
                                                  input longint unsigned x,
                                                  input longint unsigned y);
    return rpr_ref(h, x >> (n - h), y >> (n - h)) << (2 * n - h);
  endfunction

endpackage
