// End-to-end testbench for prns_cmult at its default size (N = 4, no parameter override): every
// one of the 65,536 operand pairs is applied and Re z, Im z are compared with xr*yr - xi*yi and
// xr*yi + xi*yr. The worked example x = 5 + j11, y = 12 + j9 -> -39 + j177 comes first, and the
// convolution coefficients seen inside the unit are compared with its q = (-12, 32, 75, 34, 49,
// -78, -14, -32). The wider configuration N = 8 is tested in tb_prns_cmult_n8.
//
// The testbench also counts, through the unit's internal signals, how often each mechanism of the
// algorithm was exercised, and fails if one never was:
//   - a variable-sign partial product (from w3, w7, v3 or v7) steered to the negative group,
//   - one steered to the positive group,
//   - a non-zero term with weight 2^-1 (half-weight entries of G),
//   - a coefficient q_i that is not an integer (odd 2*q_i),
//   - a negative real part and a zero real part of the result.
module tb_prns_cmult;
  import prns_pkg::q_w;

  int checks = 0, failures = 0;
  int n_var_neg = 0, n_var_pos = 0, n_half = 0, n_frac_q = 0, n_neg_re = 0, n_zero_re = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0]        xr, xi, yr, yi;
  logic signed [9:0] zr, zi;
  prns_cmult dut (.xr, .xi, .yr, .yi, .zr, .zi);

  localparam int QEX[8] = '{-12, 32, 75, 34, 49, -78, -14, -32};

  task automatic chk(input int n, input longint a, input longint b, input longint c,
                     input longint d, input longint gr, input longint gi);
    checks++;
    if (gr != a * c - b * d || gi != a * d + b * c) begin
      failures++;
      $display("FAIL N=%0d (%0d+j%0d)(%0d+j%0d) = %0d + j%0d", n, a, b, c, d, gr, gi);
    end
  endtask

  function automatic bit var_sign(input int m);
    return m == 3 || m == 7;
  endfunction

  task automatic count_events();
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < 8; j++) begin
        if (dut.z_mag[i][j] != 0 && (var_sign((i - j + 8) % 8) || var_sign(j))) begin
          if (dut.z_sgn[i][j]) n_var_neg++;
          else                 n_var_pos++;
        end
        if (dut.z_mag[i][j] != 0 && prns_pkg::g_shift(i, j, 1) == 0) n_half++;
      end
      if (dut.q2[i][0]) n_frac_q++;
    end
    if (zr < 0)  n_neg_re++;
    if (zr == 0) n_zero_re++;
  endtask

  task automatic mech(input string name, input int cnt);
    $display("  %-34s %0d", name, cnt);
    checks++;
    if (cnt == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", name);
    end
  endtask

  initial begin
    xr = 4'd5; xi = 4'd11; yr = 4'd12; yi = 4'd9;
    @(negedge clk);
    chk(4, 5, 11, 12, 9, longint'(zr), longint'(zi));
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (int'(signed'(dut.q2[i])) != 2 * QEX[i]) begin
        failures++;
        $display("FAIL example q%0d = %0d/2, expected %0d", i, signed'(dut.q2[i]), QEX[i]);
      end
    end
    for (int k = 0; k < 65536; k++) begin
      {xr, xi, yr, yi} = 16'(k);
      @(negedge clk);
      chk(4, longint'(xr), longint'(xi), longint'(yr), longint'(yi), longint'(zr), longint'(zi));
      count_events();
    end
    $display("mechanism counts:");
    mech("variable-sign term -> negative group", n_var_neg);
    mech("variable-sign term -> positive group", n_var_pos);
    mech("non-zero half-weight (2^-1) term", n_half);
    mech("non-integer q_i", n_frac_q);
    mech("negative real part", n_neg_re);
    mech("zero real part", n_zero_re);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
