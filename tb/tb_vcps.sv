// Test of the proportional-path phase shifter on a 1 GHz four-phase clock.
// Random target offsets (also wrapping past the word's range) are presented
// in the reference domain.  Checked: the applied offset reaches the target;
// the shifter moves one step per SCK cycle at most; each step shows up as a
// 0.75 ns (advance) or 1.25 ns (delay) period, and the numbers of these equal
// the numbers of -1 and +1 steps; once settled the output equals the phase
// PHI(applied mod 4 + 1).
`timescale 1ns / 1fs
module tb_vcps;
  import dpll_pkg::*;
  logic ref_clk = 1'b0, rst_n = 1'b1;
  logic [3:0] phi = '0;
  logic signed [11:0] offset = '0, applied;
  logic phi_out, sck;
  step_t step;
  int checks = 0, failures = 0, n_m1 = 0, n_p1 = 0, n_short = 0, n_long = 0;
  realtime t_rise = 0.0;

  vcps dut (.ref_clk, .rst_n, .offset, .phi, .phi_out, .sck, .step, .applied);

  always #100 ref_clk = ~ref_clk;

  initial begin
    int m = 0;
    forever begin
      for (int k = 0; k < 4; k++) phi[k] = (((m + k) % 4) < 2);
      #0.25;
      m = (m + 1) % 4;
    end
  end

  always @(posedge sck) begin
    if (step == STEP_M1) n_m1++;
    if (step == STEP_P1) n_p1++;
  end
  always @(posedge phi_out) begin
    real per;
    per = $realtime - t_rise;
    if (t_rise > 10.0) begin
      checks++;
      if (per > 0.749 && per < 0.751)      n_short++;
      else if (per > 1.249 && per < 1.251) n_long++;
      else if (!(per > 0.999 && per < 1.001)) begin failures++; $display("FAIL period %f", per); end
    end
    t_rise = $realtime;
  end

  initial begin : watchdog
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int targets[8] = '{3, -2, 17, 17, -40, 2047, -2047, 5};
    #0.3 rst_n = 1'b0;
    #2 rst_n = 1'b1;
    foreach (targets[i]) begin
      @(negedge ref_clk) offset = 12'(targets[i]);
      #40000;
      checks++;
      if (applied !== 12'(targets[i])) begin failures++; $display("FAIL applied %0d target %0d", applied, targets[i]); end
      @(posedge phi[0]);
      #0.125;
      repeat (8) begin
        #0.25;
        checks++;
        if (phi_out !== phi[int'(applied) & 3]) begin failures++; $display("FAIL alignment"); end
      end
    end
    checks += 2;
    if (n_short != n_m1) begin failures++; $display("FAIL %0d short periods for %0d -1 steps", n_short, n_m1); end
    if (n_long != n_p1)  begin failures++; $display("FAIL %0d long periods for %0d +1 steps", n_long, n_p1); end
    $display("steps -1: %0d, +1: %0d", n_m1, n_p1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
