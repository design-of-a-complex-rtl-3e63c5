// Shared constants and elaboration-time functions of the PRNS complex multiplier.
//
// An N-bit complex operand is cut into four N/4-bit segments per part and mapped onto a
// polynomial of degree 7 in the ring modulo (x^8 - 1), evaluated at k = exp(j*pi/4). Coefficient
// w_m carries the scale factor a_m of eq. (3): 2^(3N/4) for m = 0, 2; 2^(N/2)/sqrt(2) for m = 1, 3;
// 2^(N/4) for m = 4, 6 and 1/sqrt(2) for m = 5, 7. The product of two polynomials is an 8-point
// cyclic convolution whose coefficient q_i = sum_j z_ij * g_ij, with z_ij = w_(i-j mod 8) * v_j and
// g_ij = a_(i-j) * a_j / c_i (c_i = 1 for even i, 1/sqrt(2) for odd i). Every g_ij is a power of two
// between 2^-1 and 2^(6N/4), so the hardware carries 2*q_i, which is an integer, and turns each
// weight into a left shift g_shift() = log2(g_ij) + 1. For N = 4 the shifts reproduce the weight
// matrix G of the algorithm row by row. All widths are derived here so that the modules agree.
package prns_pkg;

  // Number of polynomial coefficients (ring modulo x^8 - 1).
  localparam int TAPS = 8;

  // Width of a coefficient magnitude: a sum of two S-bit segments needs S+1 bits.
  function automatic int mag_w(input int n);
    return n / 4 + 1;
  endfunction

  // Width of the magnitude of a partial product w_i * v_j.
  function automatic int prod_w(input int n);
    return 2 * mag_w(n);
  endfunction

  // Width of the two's-complement results z_re, z_im: |Re| <= (2^N-1)^2, 0 <= Im <= 2(2^N-1)^2.
  function automatic int out_w(input int n);
    return 2 * n + 2;
  endfunction

  // Twice log2 of the scale factor a_m of coefficient m (eq. 3), s = N/4.
  function automatic int a2(input int m, input int s);
    case (m & 7)
      0, 2:    return 6 * s;
      1, 3:    return 4 * s - 1;
      4, 6:    return 2 * s;
      default: return -1;
    endcase
  endfunction

  // Left shift of term z_ij inside 2*q_i, i.e. log2(g_ij) + 1 (always >= 0).
  function automatic int g_shift(input int i, input int j, input int s);
    return (a2(i - j, s) + a2(j, s) + (i & 1)) / 2 + 1;
  endfunction

  // Largest magnitude coefficient m can take: w1 and w5 are sums of two segments.
  function automatic longint max_mag(input int m, input int s);
    if ((m & 7) == 1 || (m & 7) == 5) return (64'd1 << (s + 1)) - 2;
    return (64'd1 << s) - 1;
  endfunction

  // Smallest w with 2^w > v.
  function automatic int bits_for(input longint v);
    int b;
    b = 0;
    while ((64'd1 << b) <= v) b++;
    return b;
  endfunction

  // Width of 2*q_i (two's complement), wide enough for the largest row of all eight.
  function automatic int q_w(input int n);
    int     s, w;
    longint tot;
    s = n / 4;
    w = 0;
    for (int i = 0; i < TAPS; i++) begin
      tot = 0;
      for (int j = 0; j < TAPS; j++)
        tot += max_mag(i - j, s) * max_mag(j, s) * (64'd1 << g_shift(i, j, s));
      if (bits_for(tot) + 1 > w) w = bits_for(tot) + 1;
    end
    return w;
  endfunction

  // Internal width of the final adders: holds every 2*q_i and twice either result.
  function automatic int pr_w(input int n);
    return (q_w(n) > out_w(n) + 1) ? q_w(n) : out_w(n) + 1;
  endfunction

endpackage
