// Test of the FLL controller in a closed loop with a simple oscillator model
// written here: f = F0 + code * 125 kHz, four counts per reference period.
// From two starting points (F0 = 180.0625 MHz and F0 = 200.0625 MHz, target
// 256 MHz halfway between two codes, so that only the modulator can reach it;
// 1 MHz reference) the loop must bring the oscillator, averaged over 100
// reference periods, to within 1000 ppm of 256 MHz, with the DAC code near
// (256 MHz - F0) / 125 kHz; the DAC code must dither (the modulator works).
`timescale 1ns / 1fs
module tb_fll_ctrl;
  logic ref_clk = 1'b0, rst_n = 1'b1, vco = 1'b0;
  logic [9:0] dac_code;
  logic signed [7:0] fd_err;
  logic [22:0] acc;
  real f0 = 180.0e6;
  int checks = 0, failures = 0, edges = 0, changes = 0;

  fll_ctrl dut (.ref_clk, .rst_n, .vco_clk(vco), .dac_code, .fd_err, .acc);

  always #500 ref_clk = ~ref_clk;
  always #(0.5e9 / (f0 + real'(dac_code) * 125.0e3)) vco = ~vco;
  always @(posedge vco) edges++;
  always @(dac_code) changes++;

  initial begin : watchdog
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real fs[2] = '{180.0625e6, 200.0625e6};
    real f, ppm, code_exp;
    foreach (fs[i]) begin
      f0 = fs[i];
      rst_n = 1'b1;
      #1 rst_n = 1'b0;
      #2 rst_n = 1'b1;
      #600000;
      edges = 0;
      changes = 0;
      #100000;
      f = real'(edges) / 100.0e-6;
      ppm = (f - 256.0e6) / 256.0e6 * 1.0e6;
      code_exp = (256.0e6 - f0) / 125.0e3;
      $display("F0=%0.4f MHz: f=%0.4f MHz (%0.0f ppm), code %0d (expected %0.1f)", f0 / 1.0e6, f / 1.0e6, ppm, dac_code, code_exp);
      checks += 3;
      if (ppm > 1000.0 || ppm < -1000.0) begin failures++; $display("FAIL frequency"); end
      if (real'(dac_code) > code_exp + 3.0 || real'(dac_code) < code_exp - 3.0) begin failures++; $display("FAIL code"); end
      if (changes < 10) begin failures++; $display("FAIL no dither"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
