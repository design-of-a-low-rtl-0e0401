// Test of the FLL frequency detector.  A Gray-coded counter here counts the
// cycles of a clock whose period is set so that 256 + d cycles fit in one
// 1000 ns reference period.  For d = 0, +3, -5 and +0.5 the detector output
// summed over 40 periods must equal 40 * d within one count, and for integer
// d each single reading must be d or d +- 1.
`timescale 1ns / 1fs
module tb_freq_detector;
  logic ref_clk = 1'b0, rst_n = 1'b1, vco = 1'b0;
  logic [7:0] cnt = '0, gray;
  logic signed [7:0] err;
  logic valid;
  real per = 1000.0 / 256.0;
  int checks = 0, failures = 0;

  freq_detector dut (.ref_clk, .rst_n, .count_gray(gray), .err, .valid);

  always #500 ref_clk = ~ref_clk;
  always #(per / 2.0) vco = ~vco;
  always @(posedge vco) cnt <= cnt + 8'd1;
  assign gray = cnt ^ (cnt >> 1);

  initial begin : watchdog
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ds[4] = '{0.0, 3.0, -5.0, 0.5};
    int sum;
    #1 rst_n = 1'b0;
    #2 rst_n = 1'b1;
    repeat (3) @(posedge ref_clk);
    #1;
    checks++;
    if (valid) begin failures++; $display("FAIL valid too early"); end
    @(posedge ref_clk) #1;
    checks++;
    if (!valid) begin failures++; $display("FAIL valid"); end
    foreach (ds[i]) begin
      per = 1000.0 / (256.0 + ds[i]);
      repeat (4) @(posedge ref_clk);
      sum = 0;
      repeat (40) begin
        @(posedge ref_clk) #1;
        sum += int'(err);
        if (ds[i] == real'(int'(ds[i]))) begin
          checks++;
          if (int'(err) > int'(ds[i]) + 1 || int'(err) < int'(ds[i]) - 1) begin
            failures++; $display("FAIL reading %0d for d=%f", err, ds[i]);
          end
        end
      end
      checks++;
      if (real'(sum) > 40.0 * ds[i] + 1.0 || real'(sum) < 40.0 * ds[i] - 1.0) begin
        failures++; $display("FAIL sum %0d for d=%f", sum, ds[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
