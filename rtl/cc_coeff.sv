// cc_coeff - coefficient computation (block CC) for one complex operand.
//
// Splits re and im (unsigned, N bits) into four S = N/4-bit segments r3..r0 and i3..i0 and
// forms the eight coefficients of the polynomial W(k) in sign-magnitude form:
//   w0 = r3,  w1 = r2 + i2,  w2 = i3,  w3 = i2 - r2,
//   w4 = -r1, w5 = -(r0 + i0), w6 = -i1, w7 = r0 - i0.
// These follow from equating the polynomial, evaluated at k = exp(j*pi/4), with the segmented
// operand, one segment pair at a time. w0..w2 are never negative and w4..w6 never positive, so
// their sign bits are constants; only w3 and w7 have a data-dependent sign. For S = 1 the
// expressions reduce to two-input gates: |w1| = {r2&i2, r2^i2}, sign(w3) = r2&~i2, |w3| = r2^i2,
// |w5| = {r0&i0, r0^i0}, sign(w7) = ~r0&i0, |w7| = r0^i0. Sign-magnitude coding and the
// coefficient definitions follow the algorithm; the packed output layout is this design's own.
// Purely combinational.
module cc_coeff
  import prns_pkg::*;
#(
  parameter int N = 4                          // operand width, a multiple of 4
) (
  input  logic [N-1:0]                re,      // real part, unsigned
  input  logic [N-1:0]                im,      // imaginary part, unsigned
  output logic [TAPS-1:0][N/4:0]      mag,     // |w_m|, S+1 bits each
  output logic [TAPS-1:0]             sgn      // 1: w_m is negative
);
  localparam int S = N / 4;

  logic [S-1:0] r0, r1, r2, r3, i0, i1, i2, i3;

  assign {r3, r2, r1, r0} = re;
  assign {i3, i2, i1, i0} = im;

  always_comb begin
    mag[0] = {1'b0, r3};               sgn[0] = 1'b0;
    mag[1] = {1'b0, r2} + {1'b0, i2};  sgn[1] = 1'b0;
    mag[2] = {1'b0, i3};               sgn[2] = 1'b0;
    sgn[3] = r2 > i2;
    mag[3] = sgn[3] ? {1'b0, r2} - {1'b0, i2} : {1'b0, i2} - {1'b0, r2};
    mag[4] = {1'b0, r1};               sgn[4] = 1'b1;
    mag[5] = {1'b0, r0} + {1'b0, i0};  sgn[5] = 1'b1;
    mag[6] = {1'b0, i1};               sgn[6] = 1'b1;
    sgn[7] = i0 > r0;
    mag[7] = sgn[7] ? {1'b0, i0} - {1'b0, r0} : {1'b0, r0} - {1'b0, i0};
  end
endmodule
