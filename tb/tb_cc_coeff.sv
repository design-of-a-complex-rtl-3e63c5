// Testbench for cc_coeff: every 4-bit operand pair exhaustively (N = 4), plus random 8-bit
// operands on a second instance (N = 8). Each coefficient's signed value is compared with the
// segment formula, and the coefficients are also checked to rebuild the operand through the
// polynomial W(k) at k = exp(j*pi/4), i.e. sum_m a_m * w_m * k^m == re + j*im.
module tb_cc_coeff;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0]      re4, im4;
  logic [7:0][1:0] mag4;
  logic [7:0]      sgn4;
  cc_coeff #(.N(4)) dut4 (.re(re4), .im(im4), .mag(mag4), .sgn(sgn4));

  logic [7:0]      re8, im8;
  logic [7:0][2:0] mag8;
  logic [7:0]      sgn8;
  cc_coeff #(.N(8)) dut8 (.re(re8), .im(im8), .mag(mag8), .sgn(sgn8));

  function automatic int sm(input int mag, input logic sgn);
    return sgn ? -mag : mag;
  endfunction

  task automatic check_one(input int n, input int re, input int im);
    int  s, val;
    real pr, pi, ang;
    s  = n / 4;
    pr = 0.0;
    pi = 0.0;
    for (int m = 0; m < 8; m++) begin
      val = (n == 4) ? sm(int'(mag4[m]), sgn4[m]) : sm(int'(mag8[m]), sgn8[m]);
      checks++;
      if (val !== ref_coef(m, re, im, s)) begin
        failures++;
        $display("FAIL N=%0d re=%0d im=%0d w%0d=%0d expected %0d", n, re, im, m, val,
                 ref_coef(m, re, im, s));
      end
      ang = 3.14159265358979 / 4.0 * m;
      pr += scale(m, s) * val * $cos(ang);
      pi += scale(m, s) * val * $sin(ang);
    end
    checks++;
    if (longint'(pr) != re || longint'(pi) != im) begin
      failures++;
      $display("FAIL N=%0d W(k) = %f + j%f, expected %0d + j%0d", n, pr, pi, re, im);
    end
  endtask

  initial begin
    for (int r = 0; r < 16; r++)
      for (int i = 0; i < 16; i++) begin
        re4 = 4'(r);
        im4 = 4'(i);
        @(negedge clk);
        check_one(4, r, i);
      end
    for (int t = 0; t < 2000; t++) begin
      re8 = 8'($urandom);
      im8 = 8'($urandom);
      @(negedge clk);
      check_one(8, int'(re8), int'(im8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
