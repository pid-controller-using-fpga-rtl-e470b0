// tb_pid_core: self-checking testbench for the PID datapath.
//
// Drives random set points and measurements, with samples spaced by random
// gaps and several coefficient sets (P, PI, PD, PID and random ones), and
// compares u with an integer model of
//   u_k = u_{k-1} + b0*e_k + b1*e_{k-1} + b2*e_{k-2}
// kept in units of 2^-16, whose integer part clamped to 0..255 is the
// expected output. It checks that u_valid follows y_valid by
// exactly one clock and that u does not change between samples, and counts
// clamps at both ends of the range.
`timescale 1ns / 1ps
module tb_pid_core;
  import pid_pkg::*;

  logic         clk = 1'b0;
  logic         rst;
  logic [7:0]   ref_in, y;
  logic         y_valid;
  coef_t        b0, b1, b2;
  logic [7:0]   u;
  logic         u_valid;

  int checks = 0, failures = 0;
  int sat_hi = 0, sat_lo = 0, reg_sat = 0;
  localparam longint U_MAX = (longint'(1) << 31) - 1;
  localparam longint U_MIN = -(longint'(1) << 31);

  // Expected output code: integer part of u_{k-1}, clamped to 0..255.
  function automatic logic [7:0] u_code(longint uu);
    longint i;
    i = uu >>> 16;
    return (i < 0) ? 8'd0 : (i > 255) ? 8'd255 : 8'(i);
  endfunction

  pid_core dut (.*);

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model state.
  longint m_u, m_e1, m_e2;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic do_reset();
    rst = 1'b1; y_valid = 1'b0; ref_in = '0; y = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    m_u = 0; m_e1 = 0; m_e2 = 0;
  endtask

  task automatic step(input logic [7:0] r, input logic [7:0] yy);
    longint e0, s;
    @(negedge clk);
    ref_in = r; y = yy; y_valid = 1'b1;
    e0 = longint'(r) - longint'(yy);
    s  = m_u + longint'(b0) * e0 + longint'(b1) * m_e1 + longint'(b2) * m_e2;
    if (s > U_MAX) begin s = U_MAX; reg_sat++; end
    if (s < U_MIN) begin s = U_MIN; reg_sat++; end
    m_u = s; m_e2 = m_e1; m_e1 = e0;
    if (m_u < 0) sat_lo++;
    else if (m_u >= 256 * 65536) sat_hi++;
    @(negedge clk);
    y_valid = 1'b0;
    ref_in = 8'($urandom); y = 8'($urandom);   // must not matter now
    check(u_valid == 1'b1, "u_valid one clock after y_valid");
    check(u == u_code(m_u), $sformatf("u=%0d expected %0d", u, u_code(m_u)));
    repeat ($urandom_range(0, 3)) begin
      @(negedge clk);
      check(u_valid == 1'b0, "u_valid is a single pulse");
      check(u == u_code(m_u), "u held between samples");
    end
  endtask

  initial begin
    // P only, Kp = 2: u_k follows 2*e_k.
    b0 = to_coef(2.0); b1 = to_coef(-2.0); b2 = '0;
    do_reset();
    step(8'd102, 8'd0);
    check(u == 8'd204, "P step gives Kp*e");
    for (int i = 0; i < 200; i++) step(8'($urandom), 8'($urandom));

    // PI, Kp = 2, KI = 0.5.
    b0 = to_coef(2.0); b1 = to_coef(-1.5); b2 = '0;
    do_reset();
    for (int i = 0; i < 50; i++) step(8'd102, 8'd100);   // integral ramps
    check(u > 8'd20, "integral action accumulates");
    for (int i = 0; i < 200; i++) step(8'($urandom), 8'($urandom_range(90, 110)));

    // PD, Kp = 2, KD = 1.
    b0 = to_coef(3.0); b1 = to_coef(-4.0); b2 = to_coef(1.0);
    do_reset();
    for (int i = 0; i < 200; i++) step(8'($urandom_range(100, 104)), 8'($urandom_range(95, 110)));

    // Default PID.
    b0 = B0_DEF; b1 = B1_DEF; b2 = B2_DEF;
    check(b0 == 32'sd196608 && b1 == -32'sd261967 && b2 == 32'sd65536, "default coefficients");
    do_reset();
    for (int i = 0; i < 400; i++) step(8'($urandom), 8'($urandom));

    // Random coefficients, including fractional ones.
    for (int k = 0; k < 10; k++) begin
      b0 = coef_t'($urandom_range(0, 1 << 21)) - 32'sd1048576;
      b1 = coef_t'($urandom_range(0, 1 << 21)) - 32'sd1048576;
      b2 = coef_t'($urandom_range(0, 1 << 21)) - 32'sd1048576;
      do_reset();
      for (int i = 0; i < 100; i++) step(8'($urandom), 8'($urandom));
    end

    check(sat_hi > 0, "upper clamp exercised");
    check(sat_lo > 0, "lower clamp exercised");
    // Drive u_{k-1} into its own positive and negative limits.
    b0 = 32'sh7FFF_FFFF; b1 = '0; b2 = '0;
    do_reset();
    for (int i = 0; i < 20; i++) step(8'd255, 8'd0);
    check(u == 8'd255, "output at top after register saturation");
    for (int i = 0; i < 2; i++) step(8'd0, 8'd255);
    check(u == 8'd0, "register saturation does not wrap");
    check(reg_sat > 0, "register saturation exercised");
    $display("samples clamped high=%0d low=%0d, register saturated=%0d", sat_hi, sat_lo, reg_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
