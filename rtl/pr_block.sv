// pr_block - real and imaginary parts of the product (block PR).
//
// Evaluating Q(k) at k = exp(j*pi/4) gives
//   Re z = q0 - q4 + (q1 - q3 - q5 + q7)/2,   Im z = q2 - q6 + (q1 + q3 - q5 - q7)/2.
// The inputs are P_i = 2*q_i, so 2*Re z = P0 - P4 + (P1 - P3 - P5 + P7)/2 and likewise for Im.
// Odd-index q_i are multiples of 2^(N/4), so P_odd/2 is an exact arithmetic shift. Each result is
// one 6-operand carry-save (Wallace) tree followed by a ripple-carry adder. A subtracted operand
// enters inverted, and the three "+1"s this needs are supplied without a seventh operand: two go
// into bit 0 of two added operands that are known to be even (q1 and q7 for Re, q1 and q3 for Im)
// and one is the adder's carry-in. 2*Re z and 2*Im z are even; the outputs drop that zero bit.
// The 6-operand Wallace trees and ripple-carry final adders follow the algorithm; the correction
// injection is this design's choice. Purely combinational.
module pr_block
  import prns_pkg::*;
#(
  parameter int N = 4
) (
  input  logic        [TAPS-1:0][q_w(N)-1:0] q2,   // 2*q_i, two's complement
  output logic signed [out_w(N)-1:0]         zr,   // Re z
  output logic signed [out_w(N)-1:0]         zi    // Im z
);
  localparam int PRW  = pr_w(N);
  localparam int OUTW = out_w(N);

  logic signed [TAPS-1:0][PRW-1:0] p;           // 2*q_i, sign-extended
  logic        [PRW-1:0]           h1, h3, h5, h7; // q_i for odd i
  logic        [5:0][PRW-1:0]      re_ops, im_ops;
  logic        [PRW-1:0]           re_s, re_c, im_s, im_c, re2, im2;

  for (genvar i = 0; i < TAPS; i++) begin : g_ext
    assign p[i] = PRW'(signed'(q2[i]));
  end

  assign h1 = PRW'(signed'(p[1]) >>> 1);
  assign h3 = PRW'(signed'(p[3]) >>> 1);
  assign h5 = PRW'(signed'(p[5]) >>> 1);
  assign h7 = PRW'(signed'(p[7]) >>> 1);

  // 2*Re = P0 + q1 - q3 - P4 - q5 + q7
  assign re_ops = {p[0], h1 | PRW'(1), ~h3, ~p[4], ~h5, h7 | PRW'(1)};
  // 2*Im = q1 + P2 + q3 - q5 - P6 - q7
  assign im_ops = {h1 | PRW'(1), p[2], h3 | PRW'(1), ~h5, ~p[6], ~h7};

  csa_tree #(.K(6), .W(PRW)) u_re_tree (.ops(re_ops), .sum(re_s), .carry(re_c));
  csa_tree #(.K(6), .W(PRW)) u_im_tree (.ops(im_ops), .sum(im_s), .carry(im_c));

  rca #(.W(PRW)) u_re_add (.a(re_s), .b(re_c), .cin(1'b1), .s(re2), .cout());
  rca #(.W(PRW)) u_im_add (.a(im_s), .b(im_c), .cin(1'b1), .s(im2), .cout());

  assign zr = re2[OUTW:1];
  assign zi = im2[OUTW:1];
endmodule
