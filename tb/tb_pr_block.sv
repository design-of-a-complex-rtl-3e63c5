// Testbench for pr_block. The worked example (x = 5 + j11, y = 12 + j9) with q = (-12, 32, 75, 34, 49, -78, -14, -32) must
// give Re z = -39, Im z = 177. Then, for N = 4 exhaustively over all operand pairs and for N = 8
// on random pairs, the reference coefficients 2*q_i of x*y are applied and the outputs are
// compared with xr*yr - xi*yi and xr*yi + xi*yr.
module tb_pr_block;
  import tb_ref_pkg::*;
  import prns_pkg::q_w;
  import prns_pkg::out_w;

  localparam int QW4 = q_w(4), OW4 = out_w(4);
  localparam int QW8 = q_w(8), OW8 = out_w(8);

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        [7:0][QW4-1:0] q4;
  logic signed [OW4-1:0]      zr4, zi4;
  pr_block #(.N(4)) dut4 (.q2(q4), .zr(zr4), .zi(zi4));

  logic        [7:0][QW8-1:0] q8;
  logic signed [OW8-1:0]      zr8, zi8;
  pr_block #(.N(8)) dut8 (.q2(q8), .zr(zr8), .zi(zi8));

  localparam int QEX[8] = '{-12, 32, 75, 34, 49, -78, -14, -32};

  task automatic chk(input int n, input longint xr, input longint xi, input longint yr,
                     input longint yi, input longint gr, input longint gi);
    checks++;
    if (gr != xr * yr - xi * yi || gi != xr * yi + xi * yr) begin
      failures++;
      $display("FAIL N=%0d (%0d+j%0d)(%0d+j%0d) = %0d + j%0d", n, xr, xi, yr, yi, gr, gi);
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) q4[i] = QW4'(2 * QEX[i]);
    @(negedge clk);
    chk(4, 5, 11, 12, 9, longint'(zr4), longint'(zi4));
    for (int k = 0; k < 65536; k++) begin
      int xr, xi, yr, yi;
      {xr, xi, yr, yi} = {28'd0, 4'(k >> 12), 28'd0, 4'(k >> 8), 28'd0, 4'(k >> 4), 28'd0, 4'(k)};
      for (int i = 0; i < 8; i++) q4[i] = QW4'(ref_q2_xy(i, xr, xi, yr, yi, 1));
      @(negedge clk);
      chk(4, xr, xi, yr, yi, longint'(zr4), longint'(zi4));
    end
    for (int t = 0; t < 3000; t++) begin
      longint xr, xi, yr, yi;
      xr = $urandom_range(255); xi = $urandom_range(255);
      yr = $urandom_range(255); yi = $urandom_range(255);
      for (int i = 0; i < 8; i++) q8[i] = QW8'(ref_q2_xy(i, xr, xi, yr, yi, 2));
      @(negedge clk);
      chk(8, xr, xi, yr, yi, longint'(zr8), longint'(zi8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
