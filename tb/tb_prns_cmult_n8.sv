// Testbench for prns_cmult with N = 8 (2-bit segments, 3-bit coefficient magnitudes): 20,000
// random operand pairs plus the corner values 0 and 255, compared with xr*yr - xi*yi and
// xr*yi + xi*yr.
module tb_prns_cmult_n8;
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

  logic [7:0]         xr, xi, yr, yi;
  logic signed [17:0] zr, zi;
  prns_cmult #(.N(8)) dut (.xr, .xi, .yr, .yi, .zr, .zi);

  task automatic chk();
    longint a, b, c, d;
    a = longint'(xr); b = longint'(xi); c = longint'(yr); d = longint'(yi);
    checks++;
    if (longint'(zr) != a * c - b * d || longint'(zi) != a * d + b * c) begin
      failures++;
      $display("FAIL (%0d+j%0d)(%0d+j%0d) = %0d + j%0d", a, b, c, d, zr, zi);
    end
  endtask

  initial begin
    for (int k = 0; k < 16; k++) begin
      xr = k[0] ? 8'd255 : 8'd0; xi = k[1] ? 8'd255 : 8'd0;
      yr = k[2] ? 8'd255 : 8'd0; yi = k[3] ? 8'd255 : 8'd0;
      @(negedge clk);
      chk();
    end
    for (int t = 0; t < 20000; t++) begin
      {xr, xi, yr, yi} = $urandom;
      @(negedge clk);
      chk();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
