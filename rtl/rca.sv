// rca - ripple-carry adder.
//
// A chain of W full adders: bit b adds a[b], b[b] and the carry out of bit b-1; cin enters at bit
// 0 and cout leaves bit W-1. Used as the carry-propagate stage after every carry-save tree, and,
// with cin = 1 and one operand inverted, as the subtractor that applies the two's complement of a
// negative group. The ripple-carry form of the final adders is the algorithm's; the width is a
// parameter of this design. Purely combinational; the delay grows linearly with W.
module rca #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  always_comb begin
    logic c;
    c = cin;
    for (int i = 0; i < W; i++) begin
      s[i] = a[i] ^ b[i] ^ c;
      c    = (a[i] & b[i]) | (c & (a[i] ^ b[i]));
    end
    cout = c;
  end
endmodule
