// End-to-end test of the DPLL at its default parameters: 1 MHz reference,
// divide-by-1024 feedback, VCO1 trimmed by the FLL to 256 MHz, sub-PLL x4.
// The VCO model starts far from the target (the FLL has to move the DAC by
// about 100 codes).  The test runs REF_CYCLES reference periods and checks:
//  * the FLL brings VCO1 to within 1000 ppm of 256 MHz (measured period);
//  * the output clock averages 1024 cycles per reference period over the
//    last 100 periods (within 100 ppm), the divided feedback gives one edge
//    per reference period (within one) and the bang-bang
//    detector then sees both early and late decisions (phase lock);
//  * each mechanism happened at least once: FLL corrections, BBPD early and
//    late, DPA steps of -1 and +1, DPA and VCPS bank switches, VCPS steps of
//    -1 and +1.
`timescale 1ns / 1fs
module tb_dpll_top;
  import dpll_pkg::*;

  localparam int REF_CYCLES = 700;
  localparam int LAST       = 100;

  logic ref_clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // give the asynchronous resets an edge
  logic clk_out, vcps_out, fb_clk, dpa_sck, vcps_sck, dpa_out;
  logic [9:0] dac_code;
  logic signed [1:0] bb_err;
  logic signed [13:0] dlf_acc;
  logic signed [11:0] prop;
  step_t dpa_step, vcps_step;
  logic signed [7:0] fd_err;

  dpll_top dut (.*);

  int checks = 0, failures = 0;
  int n_fll = 0, n_early = 0, n_late = 0, n_dpa_m1 = 0, n_dpa_p1 = 0;
  int n_vcps_m1 = 0, n_vcps_p1 = 0, n_dpa_sw = 0, n_vcps_sw = 0;
  int ref_n = 0, out_edges = 0, win_edges = 0, fb_edges = 0, late_early = 0, late_late = 0;

  always #500 ref_clk = ~ref_clk;

  always @(posedge ref_clk) if (rst_n) begin
    ref_n++;
    if (fd_err != 0) n_fll++;
    if (bb_err == 2'sd1)  n_early++;
    if (bb_err == -2'sd1) n_late++;
    if (ref_n > REF_CYCLES - LAST) begin
      if (bb_err == 2'sd1)  late_early++;
      if (bb_err == -2'sd1) late_late++;
    end
  end
  always @(posedge dpa_sck) begin
    if (dpa_step == STEP_M1) n_dpa_m1++;
    if (dpa_step == STEP_P1) n_dpa_p1++;
  end
  always @(posedge vcps_sck) begin
    if (vcps_step == STEP_M1) n_vcps_m1++;
    if (vcps_step == STEP_P1) n_vcps_p1++;
  end
  always @(dut.u_core.u_dpa.u_mux.sel_q)   n_dpa_sw++;
  always @(dut.u_core.u_vcps.u_mux.sel_q)  n_vcps_sw++;
  always @(posedge fb_clk) if (ref_n >= REF_CYCLES - LAST) fb_edges++;
  always @(posedge clk_out) begin
    out_edges++;
    if (ref_n >= REF_CYCLES - LAST) win_edges++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  realtime t0;
  real     f_vco1, ppm;

  initial begin
    repeat (3) @(posedge ref_clk);
    rst_n = 1'b1;
    wait (ref_n == REF_CYCLES - LAST + 1);
    // VCO1 frequency, averaged over 256 cycles
    @(posedge dut.vco1_phi[0]);
    t0 = $realtime;
    repeat (256) @(posedge dut.vco1_phi[0]);
    f_vco1 = 256.0 / (($realtime - t0) * 1.0e-9);
    ppm = (f_vco1 - 256.0e6) / 256.0e6 * 1.0e6;
    $display("VCO1 = %0.4f MHz (%0.0f ppm), DAC code %0d", f_vco1 / 1.0e6, ppm, dac_code);
    check(ppm < 1000.0 && ppm > -1000.0, "FLL: VCO1 within 1000 ppm of 256 MHz");
    wait (ref_n == REF_CYCLES);
    $display("output edges in last %0d reference periods: %0d (expected %0d)",
             LAST, win_edges, LAST * 1024);
    check(win_edges >= LAST * 1024 - 10 && win_edges <= LAST * 1024 + 10,
          "output frequency = 1024 x reference within 100 ppm");
    check(fb_edges >= LAST - 1 && fb_edges <= LAST + 1, "feedback clock locked to reference");
    check(late_early > LAST / 10 && late_late > LAST / 10,
          "bang-bang detector dithers around lock");
    $display("dlf_acc=%0d  counts: fll=%0d early=%0d late=%0d dpa-1=%0d dpa+1=%0d dpa_sw=%0d vcps-1=%0d vcps+1=%0d vcps_sw=%0d",
             dlf_acc, n_fll, n_early, n_late, n_dpa_m1, n_dpa_p1, n_dpa_sw, n_vcps_m1, n_vcps_p1, n_vcps_sw);
    check(n_fll > 0,     "mechanism: FLL correction");
    check(n_early > 0,   "mechanism: BBPD reference early");
    check(n_late > 0,    "mechanism: BBPD reference late");
    check(n_dpa_m1 > 0,  "mechanism: DPA -1 step");
    check(n_dpa_p1 > 0,  "mechanism: DPA +1 step");
    check(n_dpa_sw > 0,  "mechanism: DPA bank switch");
    check(n_vcps_m1 > 0, "mechanism: VCPS -1 step");
    check(n_vcps_p1 > 0, "mechanism: VCPS +1 step");
    check(n_vcps_sw > 0, "mechanism: VCPS bank switch");
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
