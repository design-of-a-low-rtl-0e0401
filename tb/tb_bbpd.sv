// Test of the bang-bang phase detector: random feedback levels at each
// reference edge, decisions compared with the expected sign (+1 when the
// feedback is still low, -1 when it is already high), one reference cycle
// later; 0 right after reset.
`timescale 1ns / 1fs
module tb_bbpd;
  logic ref_clk = 1'b0, rst_n = 1'b1, fb_clk = 1'b0;
  logic early, valid;
  logic signed [1:0] err;
  int checks = 0, failures = 0;

  bbpd dut (.ref_clk, .rst_n, .fb_clk, .early_ref(early), .valid, .err);

  always #10 ref_clk = ~ref_clk;

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic fb_at_edge;
    #1 rst_n = 1'b0;
    #5;
    checks++; if (err !== 2'sd0 || valid) begin failures++; $display("FAIL reset"); end
    @(negedge ref_clk) rst_n = 1'b1;
    repeat (200) begin
      @(negedge ref_clk) fb_clk = 1'($urandom_range(0, 1));
      fb_at_edge = fb_clk;
      @(posedge ref_clk) #1;
      checks++;
      if (err !== (fb_at_edge ? -2'sd1 : 2'sd1) || early !== !fb_at_edge || !valid) begin
        failures++;
        $display("FAIL fb=%0b err=%0d", fb_at_edge, err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
