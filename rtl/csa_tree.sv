// csa_tree - K-operand carry-save (Wallace) reduction tree.
//
// Each level groups the operands in threes and replaces every group by a sum word (bitwise XOR)
// and a carry word (bitwise majority shifted one place left): one row of full adders per group.
// Operands left over from a level pass to the next one unchanged. Levels repeat until two words
// remain, the sum and carry outputs; a carry-propagate adder (rca) then forms the total. Every
// result is taken modulo 2^W, so two's-complement operands add correctly when the true total fits
// in W bits. For K = 6, the size used for the real and imaginary results, the tree has three
// levels (6 -> 4 -> 3 -> 2). Wallace-tree reduction is what the algorithm prescribes for its
// multi-operand sums; building it from word-wide full-adder rows is this design's own choice.
// Purely combinational.
module csa_tree #(
  parameter int K = 6,                         // number of operands, >= 1
  parameter int W = 16                         // operand and result width
) (
  input  logic [K-1:0][W-1:0] ops,
  output logic [W-1:0]        sum,
  output logic [W-1:0]        carry
);
  // Number of words left after one level of 3:2 compression.
  function automatic int next_count(input int n);
    return (n / 3) * 2 + (n % 3);
  endfunction

  // Words present at the input of level l.
  function automatic int count_at(input int l);
    int n;
    n = K;
    for (int i = 0; i < l; i++) n = next_count(n);
    return n;
  endfunction

  function automatic int num_levels();
    int n, l;
    n = K;
    l = 0;
    while (n > 2) begin
      n = next_count(n);
      l++;
    end
    return l;
  endfunction

  localparam int LEV = num_levels();

  logic [LEV:0][K-1:0][W-1:0] stage;

  assign stage[0] = ops;

  for (genvar l = 0; l < LEV; l++) begin : g_lvl
    localparam int NIN = count_at(l);
    localparam int NG  = NIN / 3;
    localparam int NOUT = next_count(NIN);
    for (genvar g = 0; g < NG; g++) begin : g_fa
      logic [W-1:0] a, b, c;
      assign a = stage[l][3*g];
      assign b = stage[l][3*g+1];
      assign c = stage[l][3*g+2];
      assign stage[l+1][2*g]   = a ^ b ^ c;
      assign stage[l+1][2*g+1] = ((a & b) | (a & c) | (b & c)) << 1;
    end
    for (genvar r = 0; r < NIN % 3; r++) begin : g_pass
      assign stage[l+1][2*NG+r] = stage[l][3*NG+r];
    end
    for (genvar u = NOUT; u < K; u++) begin : g_unused
      assign stage[l+1][u] = '0;
    end
  end

  assign sum   = stage[LEV][0];
  assign carry = (count_at(LEV) > 1) ? stage[LEV][(count_at(LEV) > 1) ? 1 : 0] : '0;
endmodule
