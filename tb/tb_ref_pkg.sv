// Reference arithmetic for the testbenches of the PRNS complex multiplier.
//
// Everything here is worked out from the defining equations, independently of the RTL package:
// the coefficients come from the segment formulas written as signed integers, the convolution
// weights g_ij = a_(i-j) * a_j / c_i are evaluated in floating point with sqrt(2), and the result
// of a full multiplication is just xr*yr - xi*yi and xr*yi + xi*yr.
package tb_ref_pkg;

  // Signed value of coefficient m of operand (re, im), segment width s = N/4.
  function automatic int ref_coef(input int m, input longint re, input longint im, input int s);
    longint msk, r0, r1, r2, r3, i0, i1, i2, i3;
    msk = (64'd1 << s) - 1;
    r0 = re & msk; r1 = (re >> s) & msk; r2 = (re >> 2*s) & msk; r3 = (re >> 3*s) & msk;
    i0 = im & msk; i1 = (im >> s) & msk; i2 = (im >> 2*s) & msk; i3 = (im >> 3*s) & msk;
    case (m)
      0: return int'(r3);
      1: return int'(r2 + i2);
      2: return int'(i3);
      3: return int'(i2 - r2);
      4: return -int'(r1);
      5: return -int'(r0 + i0);
      6: return -int'(i1);
      default: return int'(r0 - i0);
    endcase
  endfunction

  // Scale factor a_m of coefficient m in W(k) (eq. 3).
  function automatic real scale(input int m, input int s);
    real h;
    h = $sqrt(2.0) / 2.0;
    case (m & 7)
      0, 2: return 2.0 ** (3 * s);
      1, 3: return h * 2.0 ** (2 * s);
      4, 6: return 2.0 ** s;
      default: return h;
    endcase
  endfunction

  // Weight g_ij of eq. (9): coefficient of z_ij in q_i.
  function automatic real gw(input int i, input int j, input int s);
    real c;
    c = (i % 2 == 1) ? $sqrt(2.0) / 2.0 : 1.0;
    return scale(i - j, s) * scale(j, s) / c;
  endfunction

  // 2*q_i for a row of signed partial products z[j] (exact integer).
  function automatic longint ref_q2(input int i, input longint z[8], input int s);
    real acc;
    acc = 0.0;
    for (int j = 0; j < 8; j++) acc += 2.0 * gw(i, j, s) * real'(z[j]);
    return longint'(acc);   // real-to-integer conversion rounds to nearest
  endfunction

  // 2*q_i for the operands x = (xr, xi), y = (yr, yi).
  function automatic longint ref_q2_xy(input int i, input longint xr, input longint xi,
                                       input longint yr, input longint yi, input int s);
    longint z[8];
    for (int j = 0; j < 8; j++)
      z[j] = longint'(ref_coef((i - j + 8) % 8, xr, xi, s)) * longint'(ref_coef(j, yr, yi, s));
    return ref_q2(i, z, s);
  endfunction

endpackage
