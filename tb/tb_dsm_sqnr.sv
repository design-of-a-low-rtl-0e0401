// In-band signal-to-quantization-noise ratio of the 14-bit, 18-bit-internal
// delta-sigma modulator at an oversampling ratio of 62.5: clocked at
// 125 MHz with a 1 MHz signal band (OSR = fs / 2 / f_band).
//
// A sine of half the full input range (-6 dB), on an exact DFT bin (bin 17 of
// M = 16384 samples, about 130 kHz), drives the modulator.  After a settling
// time the testbench records M output levels, applies a Hann window and
// computes the DFT bins up to the band edge (M / (2 * 62.5) = 131) directly.
// The signal is the power in the bins within two of bin 17; the noise is the
// power in the other in-band bins, leaving out bins 0 to 2.  The in-band
// SQNR must lie within 3 dB of the textbook value for an ideal second-order
// modulator with a 3-level quantizer (step D, noise D^2/12 shaped by
// (1 - z^-1)^2): SQNR = (A^2 / 2) / (pi^4 / (60 * OSR^5)), A in steps,
// about 78.7 dB here, and must exceed 75 dB.  The amplitude is this test's
// choice: half range is about the largest sine this 3-level error-feedback
// loop takes without its quantizer overloading (at 0.75 of range the
// measured SQNR falls below the ideal value instead of rising with it).
// The output must also use all three levels and stay in -1..+1.
`timescale 1ns / 1fs
module tb_dsm_sqnr;
  import dpll_pkg::*;

  localparam int  M      = 16384;
  localparam int  K_SIG  = 17;
  localparam real OSR    = 62.5;
  localparam int  K_BAND = 131;          // floor(M / (2 * OSR))
  localparam int  SETTLE = 512;
  localparam real PI     = 3.14159265358979323846;
  localparam real A_FS   = 0.5;
  localparam real AMP    = A_FS * 8191.0;

  logic clk, rst_n = 1'b1;
  initial clk = 1'b0;
  initial #1 rst_n = 1'b0;   // give the asynchronous reset an edge
  always #4 clk = ~clk;      // 125 MHz

  logic signed [13:0] x;
  logic signed [1:0]  level;
  step_t              step;

  dsm dut (.clk, .rst_n, .x, .level, .step);

  // The one-hot code must agree with the level.
  always @(posedge clk) if (rst_n) begin
    #1;
    if (step != level_to_step(level)) begin
      checks++;
      failures++;
      $display("FAIL: step code does not match level");
    end
  end

  int checks = 0, failures = 0;
  int n;
  int lv[M];
  int n_lvl[3];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Input sample n, continuous across the settling time and the record.
  function automatic logic signed [13:0] sample(input int idx);
    real s;
    s = AMP * $sin(2.0 * PI * real'(K_SIG) * real'(idx) / real'(M));
    return 14'($rtoi(s + ((s >= 0.0) ? 0.5 : -0.5)));
  endfunction

  initial begin
    x = '0;
    n = 0;
  end
  always @(negedge clk) if (rst_n) begin
    x <= sample(n);
    n <= n + 1;
  end

  real p_sig, p_noise, re, im, w, sqnr, ideal;

  initial begin
    n_lvl = '{0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (SETTLE) @(posedge clk);
    for (int i = 0; i < M; i++) begin
      @(posedge clk);
      #1;
      lv[i] = int'(level);
      if (level > 1 || level < -1) begin
        check(1'b0, "level outside -1..+1");
      end else begin
        n_lvl[int'(level) + 1]++;
      end
    end
    check(n_lvl[0] > 0 && n_lvl[1] > 0 && n_lvl[2] > 0, "all three levels used");
    p_sig   = 0.0;
    p_noise = 0.0;
    for (int k = 3; k <= K_BAND; k++) begin
      re = 0.0;
      im = 0.0;
      for (int i = 0; i < M; i++) begin
        w  = 0.5 - 0.5 * $cos(2.0 * PI * real'(i) / real'(M));
        re += w * real'(lv[i]) * $cos(2.0 * PI * real'(k) * real'(i) / real'(M));
        im -= w * real'(lv[i]) * $sin(2.0 * PI * real'(k) * real'(i) / real'(M));
      end
      if (k >= K_SIG - 2 && k <= K_SIG + 2) p_sig   += re * re + im * im;
      else                                   p_noise += re * re + im * im;
    end
    sqnr = 10.0 * $log10(p_sig / p_noise);
    $display("in-band SQNR at OSR %0.1f: %0.1f dB (levels -1/0/+1: %0d/%0d/%0d)",
             OSR, sqnr, n_lvl[0], n_lvl[1], n_lvl[2]);
    ideal = 10.0 * $log10((A_FS * A_FS / 2.0) / (PI ** 4 / (60.0 * OSR ** 5)));
    $display("ideal second-order value: %0.1f dB", ideal);
    check(sqnr >= 75.0, "in-band SQNR above 75 dB");
    check(sqnr > ideal - 3.0 && sqnr < ideal + 3.0, "SQNR within 3 dB of the ideal modulator");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #((SETTLE + M + 100) * 8.0 + 1.0e6);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
