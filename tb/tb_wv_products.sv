// Testbench for wv_products (N = 4): random sign-magnitude coefficient vectors; each of the 64
// outputs must equal w_(i-j mod 8) * v_j. The coefficient vectors of the worked example
// (w = 0,1,1,-1,0,-2,-1,0 and v = 1,1,1,-1,0,-1,0,-1) are applied first and the result is also
// compared with the example's Z matrix.
module tb_wv_products;
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

  logic [7:0][1:0]      w_mag, v_mag;
  logic [7:0]           w_sgn, v_sgn;
  logic [7:0][7:0][3:0] z_mag;
  logic [7:0][7:0]      z_sgn;

  wv_products #(.N(4)) dut (.w_mag, .w_sgn, .v_mag, .v_sgn, .z_mag, .z_sgn);

  int w[8], v[8];
  localparam int ZEX[8][8] = '{
    '{ 0,  0, -1,  2, 0,  1, 0, -1},
    '{ 1,  0,  0,  1, 0,  0, 0, -1},
    '{ 1,  1,  0,  0, 0,  2, 0,  1},
    '{-1,  1,  1,  0, 0,  1, 0,  0},
    '{ 0, -1,  1, -1, 0,  0, 0,  2},
    '{-2,  0, -1, -1, 0,  0, 0,  1},
    '{-1, -2,  0,  1, 0, -1, 0,  0},
    '{ 0, -1, -2,  0, 0, -1, 0,  0}};

  task automatic drive();
    for (int m = 0; m < 8; m++) begin
      w_mag[m] = 2'(w[m] < 0 ? -w[m] : w[m]);
      // the sign of a zero magnitude is arbitrary
      w_sgn[m] = (w[m] < 0) ? 1'b1 : (w[m] > 0 ? 1'b0 : 1'($urandom));
      v_mag[m] = 2'(v[m] < 0 ? -v[m] : v[m]);
      v_sgn[m] = (v[m] < 0) ? 1'b1 : (v[m] > 0 ? 1'b0 : 1'($urandom));
    end
  endtask

  function automatic int zval(input int i, input int j);
    return z_sgn[i][j] ? -int'(z_mag[i][j]) : int'(z_mag[i][j]);
  endfunction

  task automatic check_all(input bit example);
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (zval(i, j) != w[(i - j + 8) % 8] * v[j] || (example && zval(i, j) != ZEX[i][j])) begin
          failures++;
          $display("FAIL z[%0d][%0d] = %0d, expected %0d", i, j, zval(i, j), w[(i - j + 8) % 8] * v[j]);
        end
      end
  endtask

  initial begin
    w = '{0, 1, 1, -1, 0, -2, -1, 0};
    v = '{1, 1, 1, -1, 0, -1, 0, -1};
    drive();
    @(negedge clk);
    check_all(1'b1);
    for (int t = 0; t < 300; t++) begin
      for (int m = 0; m < 8; m++) begin
        w[m] = int'($urandom_range(6)) - 3;
        v[m] = int'($urandom_range(6)) - 3;
      end
      drive();
      @(negedge clk);
      check_all(1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
