// Test of the frequency divider at its default ratio of 1024 and at 8.
// Checked over several output periods: the output is high for exactly
// DIV/2 input cycles and low for DIV/2; the rising edge follows the input
// edge that takes the count to DIV/2; the Gray count equals the binary
// count's Gray code and changes by exactly one bit per input edge.
`timescale 1ns / 1fs
module tb_clk_divider;
  logic clk = 1'b0, rst_n = 1'b1;
  logic o1024, o8;
  logic [9:0] c1024, g1024, g_prev;
  logic [2:0] c8, g8;
  int checks = 0, failures = 0, n = 0, hi = 0, lo = 0, hi8 = 0, rises = 0;

  clk_divider dut (.clk_in(clk), .rst_n, .clk_out(o1024), .count(c1024), .count_gray(g1024));
  clk_divider #(.DIV(8)) dut8 (.clk_in(clk), .rst_n, .clk_out(o8), .count(c8), .count_gray(g8));

  always #1 clk = ~clk;

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic o_prev;
    #0.5 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    g_prev = 0; o_prev = 0;
    repeat (1024 * 5) begin
      @(posedge clk) #0.1;
      n++;
      checks += 4;
      if (c1024 !== 10'(n % 1024)) begin failures++; $display("FAIL count %0d", c1024); end
      if (g1024 !== (c1024 ^ (c1024 >> 1))) begin failures++; $display("FAIL gray"); end
      if ($countones(g1024 ^ g_prev) != 1) begin failures++; $display("FAIL gray step"); end
      if (o1024 !== ((n % 1024) >= 512)) begin failures++; $display("FAIL out at %0d", n); end
      if (o1024 && !o_prev) rises++;
      if (o8) hi8++;
      checks++;
      if (o8 !== ((n % 8) >= 4)) begin failures++; $display("FAIL div8"); end
      g_prev = g1024; o_prev = o1024;
    end
    checks += 2;
    if (rises != 5) begin failures++; $display("FAIL %0d rising edges", rises); end
    if (hi8 != 1024 * 5 / 2) begin failures++; $display("FAIL div8 duty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
