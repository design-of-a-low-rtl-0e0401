// Test of the phase rotator (circular shift register): random -1/0/+1 step
// codes, register contents compared with a model pointer after every SCK
// edge.  -1 takes S[j] from S[j-1] (pointer moves to a higher index, with
// wrap-around), +1 from S[j+1].  Reset puts the single 1 in S[1].  Run for
// N = 4 and N = 8.
`timescale 1ns / 1fs
module tb_phase_rotator;
  import dpll_pkg::*;
  logic sck = 1'b0, r_n = 1'b1;
  step_t step = STEP_ZERO;
  logic [3:0] s4;
  logic [1:0] p4;
  logic [7:0] s8;
  logic [2:0] p8;
  int checks = 0, failures = 0, m4 = 0, m8 = 0, wraps = 0;

  phase_rotator dut4 (.sck, .r_n, .step, .s(s4), .ptr(p4));
  phase_rotator #(.N(8)) dut8 (.sck, .r_n, .step, .s(s8), .ptr(p8));

  always #5 sck = ~sck;

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 r_n = 1'b0;
    #2;
    checks++;
    if (s4 !== 4'b0001 || s8 !== 8'h01) begin failures++; $display("FAIL reset"); end
    r_n = 1'b1;
    repeat (1000) begin
      int r;
      @(negedge sck);
      r = $urandom_range(0, 2);
      step = (r == 0) ? STEP_M1 : ((r == 1) ? STEP_ZERO : STEP_P1);
      if (r == 0) begin m4 = (m4 + 1) % 4; m8 = (m8 + 1) % 8; end
      if (r == 2) begin m4 = (m4 + 3) % 4; m8 = (m8 + 7) % 8; end
      if (m4 == 0 && r != 1) wraps++;
      @(posedge sck) #1;
      checks += 2;
      if (s4 !== 4'(1 << m4) || p4 !== 2'(m4)) begin failures++; $display("FAIL n4 s=%b m=%0d", s4, m4); end
      if (s8 !== 8'(1 << m8) || p8 !== 3'(m8)) begin failures++; $display("FAIL n8 s=%b m=%0d", s8, m8); end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap-around"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
