// Testbench for q_block (N = 4). The partial-product matrix of the worked example
// x = 5 + j11, y = 12 + j9 must give q = (-12, 32, 75, 34, 49, -78, -14, -32). Then the partial
// products of random operand pairs are applied and every 2*q_i is compared with the reference
// convolution.
module tb_q_block;
  import tb_ref_pkg::*;
  import prns_pkg::q_w;

  localparam int QW = q_w(4);

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0][7:0][3:0] z_mag;
  logic [7:0][7:0]      z_sgn;
  logic [7:0][QW-1:0]   q2;

  q_block #(.N(4)) dut (.z_mag, .z_sgn, .q2);

  localparam int ZEX[8][8] = '{
    '{ 0,  0, -1,  2, 0,  1, 0, -1},
    '{ 1,  0,  0,  1, 0,  0, 0, -1},
    '{ 1,  1,  0,  0, 0,  2, 0,  1},
    '{-1,  1,  1,  0, 0,  1, 0,  0},
    '{ 0, -1,  1, -1, 0,  0, 0,  2},
    '{-2,  0, -1, -1, 0,  0, 0,  1},
    '{-1, -2,  0,  1, 0, -1, 0,  0},
    '{ 0, -1, -2,  0, 0, -1, 0,  0}};
  localparam int QEX[8] = '{-12, 32, 75, 34, 49, -78, -14, -32};

  task automatic drive(input int z[8][8]);
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        z_mag[i][j] = 4'(z[i][j] < 0 ? -z[i][j] : z[i][j]);
        z_sgn[i][j] = (z[i][j] < 0) ? 1'b1 : (z[i][j] > 0 ? 1'b0 : 1'($urandom));
      end
  endtask

  initial begin
    int z[8][8];
    drive(ZEX);
    @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (int'(signed'(q2[i])) != 2 * QEX[i]) begin
        failures++;
        $display("FAIL example q%0d = %0d/2, expected %0d", i, signed'(q2[i]), QEX[i]);
      end
    end
    for (int t = 0; t < 3000; t++) begin
      int xr, xi, yr, yi;
      xr = int'($urandom_range(15)); xi = int'($urandom_range(15));
      yr = int'($urandom_range(15)); yi = int'($urandom_range(15));
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          z[i][j] = ref_coef((i - j + 8) % 8, xr, xi, 1) * ref_coef(j, yr, yi, 1);
      drive(z);
      @(negedge clk);
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (longint'(signed'(q2[i])) != ref_q2_xy(i, xr, xi, yr, yi, 1)) begin
          failures++;
          $display("FAIL q%0d for %0d+j%0d, %0d+j%0d", i, xr, xi, yr, yi);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
