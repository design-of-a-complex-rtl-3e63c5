// q_block - the eight coefficient adders of the cyclic convolution (block Q).
//
// Row i of the partial-product matrix goes to q_adder #(ROW=i), which applies row i of the weight
// matrix G. All rows work in parallel; the outputs are 2*q_0 .. 2*q_7 in two's complement.
// Purely combinational.
module q_block
  import prns_pkg::*;
#(
  parameter int N = 4
) (
  input  logic [TAPS-1:0][TAPS-1:0][2*(N/4+1)-1:0] z_mag,   // [i][j]
  input  logic [TAPS-1:0][TAPS-1:0]                z_sgn,   // [i][j]
  output logic [TAPS-1:0][q_w(N)-1:0]              q2       // 2*q_i
);
  for (genvar i = 0; i < TAPS; i++) begin : g_q
    q_adder #(.N(N), .ROW(i)) u_q (
      .z_mag (z_mag[i]),
      .z_sgn (z_sgn[i]),
      .q2    (q2[i])
    );
  end
endmodule
