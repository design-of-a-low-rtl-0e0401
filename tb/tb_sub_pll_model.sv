// Test of the charge-pump sub-PLL model.
//  * Before any input edge the output runs at 4 x (180 MHz + coarse x 125 kHz).
//  * Input 256 MHz, coarse code 400 (920 MHz free-running): after 20 us the
//    output runs at 1.024 GHz and the fine voltage sits at
//    0.61 V + (1.024 GHz - 920 MHz) / (600 MHz/V), about 0.783 V.
//  * Coarse code 608 (1.024 GHz free-running): the fine voltage returns to
//    0.61 V, and over 1000 input periods there are exactly 4000 output
//    periods (phase lock, not only frequency lock); the output edges line up
//    with the input edges within 20 ps.
//  * A phase step of the input (one period stretched by 0.4 ns) is not
//    followed at once (after 100 ns at least a quarter of it remains) but is
//    removed after 10 us (within 20 ps): the loop filters the phase.
`timescale 1ns / 1fs
module tb_sub_pll_model;
  localparam real T_IN  = 1000.0 / 256.0;   // ns
  localparam real T_OUT = T_IN / 4.0;

  logic clk_in;
  logic [9:0] coarse;
  logic [3:0] phi;
  bit   run;
  real  extra;            // one-off stretch of the next input half period, ns
  int   checks, failures;
  realtime t_out;         // last rising edge of phi[0]
  real  e_ph;             // input edge minus output edge, wrapped, ns

  sub_pll_model dut (.clk_in, .coarse, .phi);

  initial begin
    clk_in   = 1'b0;
    coarse   = 10'd400;
    run      = 1'b0;
    extra    = 0.0;
    checks   = 0;
    failures = 0;
    t_out    = 0.0;
    e_ph     = 0.0;
  end

  initial begin : input_clock
    real d;
    wait (run);
    forever begin
      d      = T_IN / 2.0 + extra;
      extra  = 0.0;
      #(d);
      clk_in = ~clk_in;
    end
  end

  always @(posedge phi[0]) t_out = $realtime;
  always @(posedge clk_in) begin
    e_ph = $realtime - t_out;
    if (e_ph > T_OUT / 2.0) e_ph = e_ph - T_OUT;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic measure(output real f);
    realtime t0;
    @(posedge phi[0]);
    t0 = $realtime;
    repeat (400) @(posedge phi[0]);
    f = 400.0 / (($realtime - t0) * 1.0e-9);
  endtask

  initial begin : watchdog
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real f, fe, v_exp;
    int  n_out;
    measure(f);
    fe = 4.0 * (180.0e6 + 400.0 * 125.0e3);
    $display("free-running: %0.4f MHz (expected %0.4f)", f / 1.0e6, fe / 1.0e6);
    check(f < fe * 1.0001 && f > fe * 0.9999, "free-running frequency from the coarse code");

    run = 1'b1;
    #20000;
    measure(f);
    v_exp = 0.61 + (1.024e9 - fe) / 600.0e6;
    $display("coarse 400: %0.4f MHz, fine voltage %0.4f V (expected %0.4f)",
             f / 1.0e6, dut.vc, v_exp);
    check(f < 1.024e9 * 1.0001 && f > 1.024e9 * 0.9999, "locked to 4 x 256 MHz");
    check(dut.vc < v_exp + 0.005 && dut.vc > v_exp - 0.005, "fine voltage for coarse 400");

    coarse = 10'd608;
    #20000;
    $display("coarse 608: fine voltage %0.4f V (expected 0.6100)", dut.vc);
    check(dut.vc < 0.615 && dut.vc > 0.605, "fine voltage 0.61 V at the right coarse code");
    @(posedge clk_in);
    n_out = 0;
    fork
      begin
        forever @(posedge phi[0]) n_out++;
      end
      begin
        repeat (1000) @(posedge clk_in);
      end
    join_any
    disable fork;
    $display("output periods in 1000 input periods: %0d, phase error %0.4f ns", n_out, e_ph);
    check(n_out >= 3999 && n_out <= 4001, "phase lock: 4 output periods per input period");
    check(e_ph < 0.02 && e_ph > -0.02, "output aligned with input");

    @(negedge clk_in);
    extra = 0.4;
    #100;
    @(posedge clk_in);
    $display("100 ns after a 0.4 ns input phase step: phase error %0.4f ns", e_ph);
    check(e_ph > 0.1, "phase step is filtered, not followed at once");
    #10000;
    @(posedge clk_in);
    $display("10 us after the step: phase error %0.4f ns", e_ph);
    check(e_ph < 0.02 && e_ph > -0.02, "phase step removed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
