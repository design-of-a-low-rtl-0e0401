// The two smaller divider settings of the DPLL: 1 MHz reference multiplied
// by 512 and by 256 (512 MHz and 256 MHz outputs), run side by side.
// Each instance keeps the x4 sub-PLL and the /8 modulator clocks, so VCO1
// must run at DIV/4 MHz (128 MHz and 64 MHz) and the FLL ratio is DIV/4.
// Only parameters change: the VCO model's range is moved down (F_MIN,
// F_LSB) so that the target lies inside the 10-bit DAC range.
// Each instance is checked after REF_CYCLES reference periods:
//  * VCO1 within 1000 ppm of DIV/4 MHz (FLL);
//  * DIV x LAST output edges (within 10) over the last LAST periods;
//  * LAST feedback edges (within one) and a dithering bang-bang detector;
//  * DPA and VCPS steps of both signs happened.
`timescale 1ns / 1fs
module tb_dpll_div;
  import dpll_pkg::*;

  localparam int REF_CYCLES = 700;
  localparam int LAST       = 100;

  logic ref_clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // give the asynchronous resets an edge
  always #500 ref_clk = ~ref_clk;

  int checks = 0, failures = 0, ref_n = 0, done_n = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge ref_clk) if (rst_n) ref_n++;

  for (genvar g = 0; g < 2; g++) begin : g_cfg
    localparam int  D     = (g == 0) ? 512 : 256;
    localparam int  FD    = D / 4;
    localparam real FMIN  = (g == 0) ? 60.0e6 : 30.0e6;
    localparam real FLSB  = (g == 0) ? 125.0e3 : 62.5e3;
    localparam real FTGT  = real'(FD) * 1.0e6;

    logic clk_out, vcps_out, fb_clk, dpa_sck, vcps_sck, dpa_out;
    logic [9:0] dac_code;
    logic signed [1:0] bb_err;
    logic signed [13:0] dlf_acc;
    logic signed [11:0] prop;
    step_t dpa_step, vcps_step;
    logic signed [$clog2(FD)-1:0] fd_err;

    dpll_top #(.DIV(D), .FLL_DIV(FD), .F_MIN(FMIN), .F_LSB(FLSB)) dut (.*);

    int win_edges = 0, fb_edges = 0, n_early = 0, n_late = 0;
    int n_dpa_m1 = 0, n_dpa_p1 = 0, n_vcps_m1 = 0, n_vcps_p1 = 0;
    realtime t0;
    real     f_vco1, ppm;

    always @(posedge ref_clk) if (rst_n && ref_n > REF_CYCLES - LAST) begin
      if (bb_err == 2'sd1)  n_early++;
      if (bb_err == -2'sd1) n_late++;
    end
    always @(posedge dpa_sck) begin
      if (dpa_step == STEP_M1) n_dpa_m1++;
      if (dpa_step == STEP_P1) n_dpa_p1++;
    end
    always @(posedge vcps_sck) begin
      if (vcps_step == STEP_M1) n_vcps_m1++;
      if (vcps_step == STEP_P1) n_vcps_p1++;
    end
    always @(posedge fb_clk)  if (ref_n >= REF_CYCLES - LAST) fb_edges++;
    always @(posedge clk_out) if (ref_n >= REF_CYCLES - LAST) win_edges++;

    initial begin
      wait (ref_n == REF_CYCLES - LAST + 1);
      @(posedge dut.vco1_phi[0]);
      t0 = $realtime;
      repeat (256) @(posedge dut.vco1_phi[0]);
      f_vco1 = 256.0 / (($realtime - t0) * 1.0e-9);
      ppm = (f_vco1 - FTGT) / FTGT * 1.0e6;
      $display("DIV %0d: VCO1 = %0.4f MHz (%0.0f ppm), DAC code %0d",
               D, f_vco1 / 1.0e6, ppm, dac_code);
      check(ppm < 1000.0 && ppm > -1000.0, $sformatf("DIV %0d: FLL within 1000 ppm", D));
      wait (ref_n == REF_CYCLES);
      $display("DIV %0d: output edges %0d (expected %0d), feedback edges %0d, early %0d late %0d, dpa -1/+1 %0d/%0d, vcps -1/+1 %0d/%0d",
               D, win_edges, LAST * D, fb_edges, n_early, n_late,
               n_dpa_m1, n_dpa_p1, n_vcps_m1, n_vcps_p1);
      check(win_edges >= LAST * D - 10 && win_edges <= LAST * D + 10,
            $sformatf("DIV %0d: output = DIV x reference", D));
      check(fb_edges >= LAST - 1 && fb_edges <= LAST + 1,
            $sformatf("DIV %0d: feedback locked to reference", D));
      check(n_early > LAST / 10 && n_late > LAST / 10,
            $sformatf("DIV %0d: bang-bang detector dithers", D));
      check(n_dpa_m1 > 0 && n_dpa_p1 > 0, $sformatf("DIV %0d: DPA steps both ways", D));
      check(n_vcps_m1 > 0 && n_vcps_p1 > 0, $sformatf("DIV %0d: VCPS steps both ways", D));
      done_n++;
    end
  end

  initial begin
    repeat (3) @(posedge ref_clk);
    rst_n = 1'b1;
    wait (done_n == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #((REF_CYCLES + 50) * 1000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
