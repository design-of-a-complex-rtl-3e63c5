// pp_mult - sign-magnitude multiplier for one partial product w_i * v_j (block WV cell).
//
// Because the coefficients are kept in sign-magnitude form, the sign of the product is the XOR
// of the operand signs and the magnitude is an unsigned product of two (N/4+1)-bit magnitudes.
// For N = 4 the magnitudes are at most 2, so the cell collapses to the five small types of the
// algorithm: 1x1 AND (type I), 2x1 (type II), 2x2 with operands in {0,1,2} (type III) and their
// signed versions (types IV, V). Constant operand signs, as for w0..w2 and w4..w6, are removed by
// synthesis. Purely combinational.
module pp_mult #(
  parameter int MW = 2                         // magnitude width of each operand
) (
  input  logic [MW-1:0]   a_mag,
  input  logic            a_sgn,               // 1: negative
  input  logic [MW-1:0]   b_mag,
  input  logic            b_sgn,
  output logic [2*MW-1:0] p_mag,
  output logic            p_sgn
);
  assign p_mag = (2*MW)'(a_mag) * (2*MW)'(b_mag);
  assign p_sgn = a_sgn ^ b_sgn;
endmodule
