// Test of the digital loop filter: random bang-bang decisions, accumulator
// and proportional word compared every reference cycle with a reference
// model (saturating sum of 2**K_I_SH * e; prop = K_P * (acc >>> P_SH)).  A
// second, narrow instance is driven into both saturation limits.
`timescale 1ns / 1fs
module tb_dlf;
  logic ref_clk = 1'b0, rst_n = 1'b1;
  logic signed [1:0] err = '0;
  logic signed [13:0] acc;
  logic signed [11:0] prop;
  logic signed [5:0]  acc_s;
  logic signed [4:0]  prop_s;
  int checks = 0, failures = 0, model, model_s, sat_hi = 0, sat_lo = 0;

  dlf dut (.ref_clk, .rst_n, .err, .acc, .prop);
  dlf #(.W(6), .K_I_SH(1), .K_P(3), .P_SH(1)) dut_s (.ref_clk, .rst_n, .err, .acc(acc_s), .prop(prop_s));

  always #10 ref_clk = ~ref_clk;

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(input int v, input int w);
    int hi = (1 << (w - 1)) - 1, lo = -(1 << (w - 1));
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  initial begin
    model = 0; model_s = 0;
    #1 rst_n = 1'b0;
    #5 rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      @(negedge ref_clk);
      // biased random walk: long runs push the narrow instance to its limits
      if (i < 200)      err = ($urandom_range(0, 9) < 8) ? 2'sd1 : -2'sd1;
      else if (i < 400) err = ($urandom_range(0, 9) < 8) ? -2'sd1 : 2'sd1;
      else              err = $urandom_range(0, 1) ? 2'sd1 : -2'sd1;
      model   = sat(model + 4 * int'(err), 14);
      model_s = sat(model_s + 2 * int'(err), 6);
      @(posedge ref_clk) #1;
      checks += 4;
      if (acc !== 14'(model))            begin failures++; $display("FAIL acc %0d vs %0d", acc, model); end
      if (prop !== 12'(4 * (model >>> 2))) begin failures++; $display("FAIL prop %0d", prop); end
      if (acc_s !== 6'(model_s))         begin failures++; $display("FAIL acc_s %0d vs %0d", acc_s, model_s); end
      if (prop_s !== 5'(3 * (model_s >>> 1))) begin failures++; $display("FAIL prop_s %0d", prop_s); end
      if (model_s == 31)  sat_hi++;
      if (model_s == -32) sat_lo++;
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin failures++; $display("FAIL saturation not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
