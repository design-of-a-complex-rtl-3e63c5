// Testbench for rca: all inputs of a 4-bit adder, random inputs of a 16-bit one; {cout, s} must
// equal a + b + cin.
module tb_rca;
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

  logic [3:0]  a4, b4, s4;
  logic        ci4, co4;
  rca #(.W(4)) dut4 (.a(a4), .b(b4), .cin(ci4), .s(s4), .cout(co4));

  logic [15:0] a16, b16, s16;
  logic        ci16, co16;
  rca #(.W(16)) dut16 (.a(a16), .b(b16), .cin(ci16), .s(s16), .cout(co16));

  initial begin
    for (int k = 0; k < 512; k++) begin
      {a4, b4, ci4} = 9'(k);
      @(negedge clk);
      checks++;
      if ({co4, s4} != (5'(a4) + 5'(b4) + 5'(ci4))) begin
        failures++;
        $display("FAIL %0d + %0d + %0d = %0d", a4, b4, ci4, {co4, s4});
      end
    end
    for (int k = 0; k < 1000; k++) begin
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      ci16 = 1'($urandom);
      @(negedge clk);
      checks++;
      if ({co16, s16} != (17'(a16) + 17'(b16) + 17'(ci16))) begin
        failures++;
        $display("FAIL %0d + %0d + %0d = %0d", a16, b16, ci16, {co16, s16});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
