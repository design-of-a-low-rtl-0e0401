// Test of the second-order error-feedback delta-sigma modulator.
// 1. Bit-exact: random slowly varying inputs, every output level compared
//    with an independent model of v = x + 2e1 - e2, 3-level quantizer,
//    e = v - q*D (D = 8192).
// 2. Mean: for constant inputs the mean output over 8192 clocks equals x/D
//    within 1/1024, and the step code is the one-hot form of the level.
`timescale 1ns / 1fs
module tb_dsm;
  import dpll_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  logic signed [13:0] x = '0;
  logic signed [1:0] level;
  step_t step;
  int checks = 0, failures = 0;
  int e1, e2, v, q, e, sum;

  dsm dut (.clk, .rst_n, .x, .level, .step);

  always #5 clk = ~clk;

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_step();
    v = int'(x) + 2 * e1 - e2;
    q = (v >= 4096) ? 1 : ((v < -4096) ? -1 : 0);
    e = v - q * 8192;
    e2 = e1;
    e1 = e;
  endtask

  initial begin
    int consts[6] = '{0, 1000, -1000, 2048, -3000, 3500};
    e1 = 0; e2 = 0;
    #1 rst_n = 1'b0;
    #2 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (i % 50 == 0) x = 14'($signed($urandom_range(0, 8000)) - 4000);
      model_step();
      @(posedge clk) #1;
      checks++;
      if (int'(level) != q) begin failures++; $display("FAIL exact i=%0d level=%0d q=%0d", i, level, q); end
      if (step != level_to_step(2'(q))) begin failures++; $display("FAIL step code"); end
    end
    foreach (consts[c]) begin
      @(negedge clk) x = 14'(consts[c]);
      repeat (64) @(posedge clk);
      sum = 0;
      repeat (8192) begin
        @(posedge clk) #1;
        sum += int'(level);
      end
      checks++;
      if (sum - consts[c] > 8 || consts[c] - sum > 8) begin
        failures++;
        $display("FAIL mean x=%0d sum=%0d", consts[c], sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
