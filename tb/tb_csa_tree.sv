// Testbench for csa_tree: random operands for the 6-operand tree of the final adders, the
// 8-operand tree of a coefficient adder and two degenerate sizes. sum + carry must equal the
// sum of all operands modulo 2^W.
module tb_csa_tree;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [5:0][15:0] ops6;
  logic [15:0]      s6, c6;
  csa_tree #(.K(6), .W(16)) dut6 (.ops(ops6), .sum(s6), .carry(c6));

  logic [7:0][11:0] ops8;
  logic [11:0]      s8, c8;
  csa_tree #(.K(8), .W(12)) dut8 (.ops(ops8), .sum(s8), .carry(c8));

  logic [2:0][9:0]  ops3;
  logic [9:0]       s3, c3;
  csa_tree #(.K(3), .W(10)) dut3 (.ops(ops3), .sum(s3), .carry(c3));

  logic [1:0][9:0]  ops2;
  logic [9:0]       s2, c2;
  csa_tree #(.K(2), .W(10)) dut2 (.ops(ops2), .sum(s2), .carry(c2));

  task automatic chk(input string name, input longint got, input longint exp_v, input int w);
    longint m;
    m = (64'd1 << w) - 1;
    checks++;
    if ((got & m) != (exp_v & m)) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (mod 2^%0d)", name, got & m, exp_v & m, w);
    end
  endtask

  initial begin
    for (int t = 0; t < 1000; t++) begin
      longint e6, e8, e3, e2;
      e6 = 0; e8 = 0; e3 = 0; e2 = 0;
      for (int k = 0; k < 6; k++) begin ops6[k] = 16'($urandom); e6 += ops6[k]; end
      for (int k = 0; k < 8; k++) begin ops8[k] = 12'($urandom); e8 += ops8[k]; end
      for (int k = 0; k < 3; k++) begin ops3[k] = 10'($urandom); e3 += ops3[k]; end
      for (int k = 0; k < 2; k++) begin ops2[k] = 10'($urandom); e2 += ops2[k]; end
      @(negedge clk);
      chk("K=6", longint'(s6) + longint'(c6), e6, 16);
      chk("K=8", longint'(s8) + longint'(c8), e8, 12);
      chk("K=3", longint'(s3) + longint'(c3), e3, 10);
      chk("K=2", longint'(s2) + longint'(c2), e2, 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
