// Testbench for q_adder (N = 4): one instance per row ROW = 0..7, each fed random signed partial
// products in the range the multiplier produces (|z_ij| <= max|w_(i-j)| * max|v_j|). The output 2*q_ROW is compared with
// 2 * sum_j g_ROW,j * z_ROW,j, with g evaluated from the scale factors in floating point. For
// ROW = 0 the example row (0, 0, -1, 2, 0, 1, 0, -1) must give q_0 = -12. Row 0's weights are also
// checked against the first row of the weight matrix G: 2^6 2^1 2^4 2^1 2^2 2^1 2^4 2^1.
module tb_q_adder;
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

  for (genvar r = 0; r < 8; r++) begin : g_dut
    q_adder #(.N(4), .ROW(r)) dut (.z_mag(z_mag[r]), .z_sgn(z_sgn[r]), .q2(q2[r]));
  end

  longint z[8][8];

  task automatic drive();
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        z_mag[i][j] = 4'(z[i][j] < 0 ? -z[i][j] : z[i][j]);
        z_sgn[i][j] = (z[i][j] < 0) ? 1'b1 : (z[i][j] > 0 ? 1'b0 : 1'($urandom));
      end
  endtask

  task automatic check_rows();
    for (int i = 0; i < 8; i++) begin
      longint got, e;
      got = longint'(signed'(q2[i]));
      e   = ref_q2(i, z[i], 1);
      checks++;
      if (got != e) begin
        failures++;
        $display("FAIL row %0d: 2q = %0d expected %0d", i, got, e);
      end
    end
  endtask

  // largest |w_m| for 1-bit segments: w1 and w5 are sums of two bits
  function automatic int mm(input int m);
    return (m == 1 || m == 5) ? 2 : 1;
  endfunction

  localparam int G0[8] = '{6, 1, 4, 1, 2, 1, 4, 1};

  initial begin
    // weights of row 0, one term at a time
    for (int j = 0; j < 8; j++) begin
      for (int i = 0; i < 8; i++) for (int k = 0; k < 8; k++) z[i][k] = 0;
      z[0][j] = 1;
      drive();
      @(negedge clk);
      checks++;
      if (longint'(signed'(q2[0])) != (64'sd2 << G0[j])) begin
        failures++;
        $display("FAIL g_0,%0d: 2q = %0d expected %0d", j, signed'(q2[0]), 64'sd2 << G0[j]);
      end
    end
    // worked example, row 0
    z[0] = '{0, 0, -1, 2, 0, 1, 0, -1};
    drive();
    @(negedge clk);
    checks++;
    if (signed'(q2[0]) != -24) begin
      failures++;
      $display("FAIL example: 2q0 = %0d expected -24", signed'(q2[0]));
    end
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          int lim;
          lim = mm((i - j + 8) % 8) * mm(j);
          z[i][j] = longint'($urandom_range(2 * lim)) - lim;
        end
      drive();
      @(negedge clk);
      check_rows();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
