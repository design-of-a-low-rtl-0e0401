// Test of the phase multiplexer and its glitch-free retimer.
// Four phases of a 4 ns clock are generated here (PHI(k+1) leads PHI(k) by
// 1 ns); SCK is the multiplexer output divided by 8, as in the DPLL.  After
// random SCK edges the one-hot pointer moves by one place either way (as the
// phase rotator does).  Checked:
//  * every output period is 4 ns, 3 ns (move to the earlier phase) or 5 ns
//    (move to the later phase), and no high or low pulse is shorter than 1 ns;
//  * the numbers of 3 ns and 5 ns periods equal the numbers of moves up and
//    down the pointer;
//  * once settled, the output equals the phase the pointer names.
`timescale 1ns / 1fs
module tb_phase_mux;
  logic [3:0] phi = '0, s = 4'b0001;
  logic rst_n = 1'b1, sck = 1'b0, phi_out, s_odd;
  int checks = 0, failures = 0, ptr = 0, ups = 0, downs = 0;
  int n_short = 0, n_long = 0, n_norm = 0, div = 0, moves_left = 300;
  realtime t_rise = 0.0, t_fall = 0.0;

  phase_mux dut (.sck, .rst_n, .s, .phi, .phi_out, .s_odd);

  initial begin
    int m = 0;
    forever begin
      for (int k = 0; k < 4; k++) phi[k] = (((m + k) % 4) < 2);
      #1.0;
      m = (m + 1) % 4;
    end
  end

  always @(posedge phi_out) begin
    div <= (div == 7) ? 0 : div + 1;
    sck <= (div + 1 >= 4 && div + 1 <= 7);
  end

  always @(posedge sck) if (rst_n && moves_left > 0) begin
    int r;
    r = $urandom_range(0, 3);
    if (r == 0) begin ptr = (ptr + 1) % 4; ups++; moves_left--; end
    else if (r == 1) begin ptr = (ptr + 3) % 4; downs++; moves_left--; end
    s <= 4'(1 << ptr);
  end

  always @(posedge phi_out) begin
    real per;
    per = $realtime - t_rise;
    if (t_rise > 20.0) begin
      checks++;
      if (per > 3.999 && per < 4.001)      n_norm++;
      else if (per > 2.999 && per < 3.001) n_short++;
      else if (per > 4.999 && per < 5.001) n_long++;
      else begin failures++; $display("FAIL period %f at %t", per, $realtime); end
      checks++;
      if ($realtime - t_fall < 0.999) begin failures++; $display("FAIL short low pulse at %t", $realtime); end
    end
    t_rise = $realtime;
  end
  always @(negedge phi_out) begin
    if (t_rise > 20.0) begin
      checks++;
      if ($realtime - t_rise < 0.999) begin failures++; $display("FAIL short high pulse at %t", $realtime); end
    end
    t_fall = $realtime;
  end

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #0.5 rst_n = 1'b0;
    #2 rst_n = 1'b1;
    wait (moves_left == 0);
    #200;
    @(posedge phi[0]);
    #0.5;
    for (int i = 0; i < 40; i++) begin
      #1.0;
      checks++;
      if (phi_out !== phi[ptr]) begin failures++; $display("FAIL alignment ptr=%0d", ptr); end
    end
    checks += 2;
    if (n_short != ups)  begin failures++; $display("FAIL %0d short periods, %0d moves up", n_short, ups); end
    if (n_long != downs) begin failures++; $display("FAIL %0d long periods, %0d moves down", n_long, downs); end
    $display("periods: %0d normal, %0d short, %0d long", n_norm, n_short, n_long);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
