// q_adder - adder for one convolution coefficient q_ROW (one row of block Q).
//
// Input: the eight sign-magnitude partial products z_ROW,j. Each magnitude is shifted left by
// g_shift(ROW, j), the weight g_ROW,j of the G matrix scaled by two. A demultiplexer driven by the
// product's sign steers the shifted term either to the positive group or to the negative group;
// the idle output is zero. Products whose sign is fixed (both coefficient signs constant) keep
// only one path after synthesis, so a group only holds the terms that can land in it. Each group is
// reduced by a carry-save tree and a ripple-carry adder; the negative sum is then inverted and added
// with carry-in 1, i.e. subtracted in two's complement. The output is 2*q_ROW, an integer even
// where q_ROW has a half-weight (2^-1) term. The grouping, demultiplexing and final two's-complement
// addition follow the algorithm; the exact placement of full and half adders inside each group is
// this design's own word-level tree. Purely combinational.
module q_adder
  import prns_pkg::*;
#(
  parameter int N   = 4,
  parameter int ROW = 0                        // which coefficient q_ROW, 0..7
) (
  input  logic [TAPS-1:0][2*(N/4+1)-1:0] z_mag,   // |z_ROW,j|, j = 0..7
  input  logic [TAPS-1:0]                z_sgn,   // sign of z_ROW,j
  output logic [q_w(N)-1:0]              q2       // 2*q_ROW, two's complement
);
  localparam int S  = N / 4;
  localparam int QW = q_w(N);

  logic [TAPS-1:0][QW-1:0] pos, neg;
  logic [QW-1:0] pos_s, pos_c, neg_s, neg_c, pos_sum, neg_sum;

  for (genvar j = 0; j < TAPS; j++) begin : g_term
    localparam int SH = g_shift(ROW, j, S);
    logic [QW-1:0] term;
    assign term   = QW'(z_mag[j]) << SH;
    assign pos[j] = z_sgn[j] ? '0 : term;
    assign neg[j] = z_sgn[j] ? term : '0;
  end

  csa_tree #(.K(TAPS), .W(QW)) u_pos_tree (.ops(pos), .sum(pos_s), .carry(pos_c));
  csa_tree #(.K(TAPS), .W(QW)) u_neg_tree (.ops(neg), .sum(neg_s), .carry(neg_c));

  rca #(.W(QW)) u_pos_add (.a(pos_s), .b(pos_c), .cin(1'b0), .s(pos_sum), .cout());
  rca #(.W(QW)) u_neg_add (.a(neg_s), .b(neg_c), .cin(1'b0), .s(neg_sum), .cout());

  // q+ + (two's complement of q-)
  rca #(.W(QW)) u_sub (.a(pos_sum), .b(~neg_sum), .cin(1'b1), .s(q2), .cout());
endmodule
