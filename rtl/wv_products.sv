// wv_products - partial-product matrix Z = W * V (block WV).
//
// W is the 8x8 circulant matrix [w_(i-j mod 8)] and V = diag(v_0..v_7), so row i of Z holds
// z_ij = w_(i-j mod 8) * v_j for j = 0..7: the eight products that the cyclic convolution sums
// into coefficient q_i. 64 pp_mult cells compute them in parallel, each in sign-magnitude form.
// Row/column indexing follows eq. (11) of the algorithm. Purely combinational.
module wv_products
  import prns_pkg::*;
#(
  parameter int N = 4
) (
  input  logic [TAPS-1:0][N/4:0]                          w_mag,
  input  logic [TAPS-1:0]                                 w_sgn,
  input  logic [TAPS-1:0][N/4:0]                          v_mag,
  input  logic [TAPS-1:0]                                 v_sgn,
  output logic [TAPS-1:0][TAPS-1:0][2*(N/4+1)-1:0]        z_mag,   // [i][j]
  output logic [TAPS-1:0][TAPS-1:0]                       z_sgn    // [i][j]
);
  for (genvar i = 0; i < TAPS; i++) begin : g_row
    for (genvar j = 0; j < TAPS; j++) begin : g_col
      pp_mult #(.MW(N/4+1)) u_mult (
        .a_mag (w_mag[(i - j + TAPS) % TAPS]),
        .a_sgn (w_sgn[(i - j + TAPS) % TAPS]),
        .b_mag (v_mag[j]),
        .b_sgn (v_sgn[j]),
        .p_mag (z_mag[i][j]),
        .p_sgn (z_sgn[i][j])
      );
    end
  end
endmodule
