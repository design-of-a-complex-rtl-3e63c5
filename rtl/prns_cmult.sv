// prns_cmult - N x N-bit complex multiplier built as an 8-point cyclic convolution in the
// polynomial residue number system (ring of polynomials modulo x^8 - 1).
//
// z = x * y with x = xr + j*xi and y = yr + j*yi, all four parts unsigned N-bit numbers.
//   CC  (cc_coeff x2): each operand becomes eight sign-magnitude coefficients w_m / v_m built
//                      from its N/4-bit segments.
//   WV  (wv_products): the 64 partial products z_ij = w_(i-j mod 8) * v_j.
//   Q   (q_block)    : the eight convolution coefficients q_i = sum_j g_ij * z_ij, each from a
//                      positive and a negative group of power-of-two-weighted terms.
//   PR  (pr_block)   : Re z and Im z from q_0..q_7 with two 6-operand Wallace trees.
// The structure and arithmetic follow the algorithm for the four stages; N = 4 (1-bit segments) is
// the default configuration, and any multiple of 4 works. The unit is purely combinational, with
// no clock or registers, as in the original design: a result is valid one combinational delay
// after the inputs change. zr and zi are two's complement, 2N+2 bits wide (Re z may be negative,
// Im z reaches 2*(2^N-1)^2).
module prns_cmult
  import prns_pkg::*;
#(
  parameter int N = 4
) (
  input  logic        [N-1:0]        xr,
  input  logic        [N-1:0]        xi,
  input  logic        [N-1:0]        yr,
  input  logic        [N-1:0]        yi,
  output logic signed [out_w(N)-1:0] zr,
  output logic signed [out_w(N)-1:0] zi
);
  logic [TAPS-1:0][N/4:0]                   w_mag, v_mag;
  logic [TAPS-1:0]                          w_sgn, v_sgn;
  logic [TAPS-1:0][TAPS-1:0][2*(N/4+1)-1:0] z_mag;
  logic [TAPS-1:0][TAPS-1:0]                z_sgn;
  logic [TAPS-1:0][q_w(N)-1:0]              q2;

  cc_coeff    #(.N(N)) u_cc_x (.re(xr), .im(xi), .mag(w_mag), .sgn(w_sgn));
  cc_coeff    #(.N(N)) u_cc_y (.re(yr), .im(yi), .mag(v_mag), .sgn(v_sgn));
  wv_products #(.N(N)) u_wv   (.w_mag, .w_sgn, .v_mag, .v_sgn, .z_mag, .z_sgn);
  q_block     #(.N(N)) u_q    (.z_mag, .z_sgn, .q2);
  pr_block    #(.N(N)) u_pr   (.q2, .zr, .zi);
endmodule
