// dct_ref_pkg: reference model of the time-multiplexed Goertzel DCT loop,
// for testbenches.
//
// bin_step() advances one bin by one sample with plain integer arithmetic:
// the coefficient is applied as an integer multiplication by the constant
// (473, 392, 2 or 0) followed by a floor division by 2^shift, independent of
// the multiplier-block netlist. real_step() does the same recursion with the
// exact coefficient 2cos(k*pi/8) in floating point.
package dct_ref_pkg;

  // Constant, shift and sign used for bin k; bins 2 and 6 have no constant of
  // their own and use the block's default select word (392, shift 8).
  function automatic void coef_of(input int k, output longint c,
                                  output int sh, output bit neg);
    neg = (k >= 5);
    case (k)
      0: begin c = 2;   sh = 0; neg = 0; end
      1, 7: begin c = 473; sh = 8; end
      2, 6: begin c = 392; sh = 8; end
      3, 5: begin c = 392; sh = 9; end
      default: begin c = 0; sh = 0; neg = 0; end
    endcase
  endfunction

  // Floor division by 2^sh of a signed value.
  function automatic longint floor_shr(input longint v, input int sh);
    longint d;
    d = longint'(1) << sh;
    if (v >= 0) return v / d;
    return -((-v + d - 1) / d);
  endfunction

  function automatic void bin_step(input int k, input longint x,
                                   inout longint w1, inout longint w2,
                                   output longint y);
    longint c, m, s, w;
    int sh;
    bit neg;
    coef_of(k, c, sh, neg);
    m = floor_shr(w1 * c, sh);
    if (neg) m = -m;
    s = (k % 2 == 1) ? -x : x;
    w = s + m - w2;
    y = w - w1;
    w2 = w1;
    w1 = w;
  endfunction

  function automatic void real_step(input int k, input real x,
                                    inout real w1, inout real w2,
                                    output real y);
    real w, s;
    s = (k % 2 == 1) ? -x : x;
    w = s + 2.0 * $cos(k * 3.14159265358979 / 8.0) * w1 - w2;
    y = w - w1;
    w2 = w1;
    w1 = w;
  endfunction

endpackage
