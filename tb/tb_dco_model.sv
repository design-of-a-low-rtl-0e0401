// Test of the DCO behavioural model (DAC + closed-loop VCO).  For several
// codes the measured frequency, once settled, must be F_MIN + code * F_LSB
// within 0.01 %, and PHI(k+1) must rise a quarter period before PHI(k).
// After a code step from 0 to 1023 the frequency must have covered
// 1 - 1/e of the step (within 5 % of the step) one time constant,
// 1 / (2*pi*3 MHz), later: the first-order response of the VCO's loop.
`timescale 1ns / 1fs
module tb_dco_model;
  logic [9:0] code = 10'd608;
  logic [3:0] phi;
  int checks = 0, failures = 0, edges = 0;

  dco_model dut (.code, .phi);

  always @(posedge phi[0]) edges++;

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int codes[4] = '{0, 608, 1023, 300};
    real f, fe, t0, t1, per;
    foreach (codes[i]) begin
      code = 10'(codes[i]);
      #2000;
      @(posedge phi[0]);
      t0 = $realtime;
      edges = 0;
      #20000;
      @(posedge phi[0]);
      t1 = $realtime;
      f = real'(edges) / ((t1 - t0) * 1.0e-9);
      fe = 180.0e6 + real'(codes[i]) * 125.0e3;
      checks++;
      if (f > fe * 1.0001 || f < fe * 0.9999) begin failures++; $display("FAIL code %0d f=%f", codes[i], f); end
      per = 1.0e9 / fe;
      for (int k = 0; k < 3; k++) begin
        @(posedge phi[k]);
        t0 = $realtime;
        @(posedge phi[k + 1]);
        t1 = $realtime;
        checks++;
        // PHI(k+1) leads PHI(k): its next rising edge comes 3/4 period later
        if ((t1 - t0) > 0.75 * per + 0.001 || (t1 - t0) < 0.75 * per - 0.001) begin
          failures++; $display("FAIL phase spacing %f", t1 - t0);
        end
      end
    end
    begin
      real tau, frac;
      tau  = 1.0e9 / (2.0 * 3.14159265358979 * 3.0e6);
      code = 10'd0;
      #2000;
      code = 10'd1023;
      #(tau);
      frac = (dut.f_hz - 180.0e6) / (1023.0 * 125.0e3);
      $display("fraction of the step after one time constant: %0.3f", frac);
      checks++;
      if (frac < 0.632 - 0.05 || frac > 0.632 + 0.05) begin
        failures++; $display("FAIL settling %f", frac);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
