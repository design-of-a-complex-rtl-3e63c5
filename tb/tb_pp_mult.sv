// Testbench for pp_mult: all operand combinations for 2-bit magnitudes (the N = 4 size), random
// ones for 3-bit magnitudes. The signed product and the sign bit are compared with integer math.
module tb_pp_mult;
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

  logic [1:0] am2, bm2;
  logic [3:0] pm2;
  logic       as2, bs2, ps2;
  pp_mult #(.MW(2)) dut2 (.a_mag(am2), .a_sgn(as2), .b_mag(bm2), .b_sgn(bs2), .p_mag(pm2), .p_sgn(ps2));

  logic [2:0] am3, bm3;
  logic [5:0] pm3;
  logic       as3, bs3, ps3;
  pp_mult #(.MW(3)) dut3 (.a_mag(am3), .a_sgn(as3), .b_mag(bm3), .b_sgn(bs3), .p_mag(pm3), .p_sgn(ps3));

  task automatic check(input int got_m, input logic got_s, input int a, input int b,
                       input logic sa, input logic sb);
    int exp_v, got_v;
    exp_v = (sa ? -a : a) * (sb ? -b : b);
    got_v = got_s ? -got_m : got_m;
    checks++;
    if (got_v != exp_v || got_s != (sa ^ sb)) begin
      failures++;
      $display("FAIL %s%0d * %s%0d -> %0d (sign %0d), expected %0d", sa ? "-" : "+", a,
               sb ? "-" : "+", b, got_v, got_s, exp_v);
    end
  endtask

  initial begin
    for (int k = 0; k < 64; k++) begin
      {am2, as2, bm2, bs2} = 6'(k);
      @(negedge clk);
      check(int'(pm2), ps2, int'(am2), int'(bm2), as2, bs2);
    end
    for (int k = 0; k < 500; k++) begin
      {am3, as3, bm3, bs3} = 8'($urandom);
      @(negedge clk);
      check(int'(pm3), ps3, int'(am3), int'(bm3), as3, bs3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
