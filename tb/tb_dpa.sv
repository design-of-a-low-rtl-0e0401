// Test of the digital phase accumulator on a 250 MHz four-phase clock.
// For several constant loop-filter words the output edges are counted over
// 40 us and compared with the expected frequency
//   f_out = 250 MHz * (1 + (word / 8192) / (4 * 8)),
// (a positive word gives -1 steps, each removing a quarter period; the
// modulator runs at f_out / 8), within 3 edges.  Every output period must
// be 3, 4 or 5 ns (no glitch).
`timescale 1ns / 1fs
module tb_dpa;
  import dpll_pkg::*;
  logic ref_clk = 1'b0, rst_n = 1'b1;
  logic [3:0] phi = '0;
  logic signed [13:0] word = '0;
  logic phi_out, sck;
  step_t step;
  logic [1:0] ptr;
  int checks = 0, failures = 0, edges = 0, n_m1 = 0, n_p1 = 0;
  realtime t_rise = 0.0;

  dpa dut (.ref_clk, .rst_n, .word, .phi, .phi_out, .sck, .step, .ptr);

  always #50 ref_clk = ~ref_clk;   // 10 MHz

  initial begin
    int m = 0;
    forever begin
      for (int k = 0; k < 4; k++) phi[k] = (((m + k) % 4) < 2);
      #1.0;
      m = (m + 1) % 4;
    end
  end

  always @(posedge phi_out) begin
    real per;
    per = $realtime - t_rise;
    edges++;
    if (t_rise > 20.0) begin
      checks++;
      if (!((per > 2.999 && per < 3.001) || (per > 3.999 && per < 4.001) || (per > 4.999 && per < 5.001))) begin
        failures++;
        $display("FAIL period %f", per);
      end
    end
    t_rise = $realtime;
  end
  always @(posedge sck) begin
    if (step == STEP_M1) n_m1++;
    if (step == STEP_P1) n_p1++;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int words[5] = '{0, 2048, -2048, 1000, -3500};
    real expct;
    #0.5 rst_n = 1'b0;
    #2 rst_n = 1'b1;
    foreach (words[i]) begin
      word = 14'(words[i]);
      #5000;
      edges = 0;
      #40000;
      expct = 40000.0 / 4.0 * (1.0 + (real'(words[i]) / 8192.0) / 32.0);
      $display("word %0d: %0d edges, expected %0.1f", words[i], edges, expct);
      checks++;
      if (real'(edges) > expct + 3.0 || real'(edges) < expct - 3.0) begin
        failures++;
        $display("FAIL frequency for word %0d", words[i]);
      end
    end
    checks++;
    if (n_m1 == 0 || n_p1 == 0) begin failures++; $display("FAIL steps not seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
