// tb_pid_top: end-to-end testbench of the complete controller at its default
// parameters (PID tuning Kp = 2, Ti = 4 ms, Td = 2.7 us; 5.4 us sampling).
//
// The controller runs in closed loop with behavioural models of the AD7823,
// the AD7303 and the second-order plant (damping M = 0.56). The set point
// steps 0 -> 102 (2 V) -> 20 -> 102. Every D/A frame is checked against an
// independent integer model of the incremental PID law fed with the codes
// the A/D model converted; the `reading` and `u` pins are checked too. The
// testbench also checks the sample period (270 clocks), the delay from the
// start of a conversion to the end of its D/A frame, the converters'
// protocol, and that the loop settles on the set point. It counts how often
// each mechanism occurred (conversions, D/A frames, clamping at the top and
// at the bottom of the D/A range, integral and derivative contributions)
// and fails if any of them never did.
`timescale 1ns / 1ps
module tb_pid_top;
  import pid_pkg::*;

  logic       clk = 1'b0;
  logic       reset;
  logic [7:0] ref_in;
  logic       ad_data, ad_convst, ad_sclk, dac_din, dac_sclk, dac_sync;
  logic [7:0] reading, u;

  int checks = 0, failures = 0;

  pid_top dut (.*);

  int          conversions, adc_errors, frames, dac_errors;
  logic [7:0]  last_code, code_a, y_code;
  logic [15:0] word;
  real         vout_a, y_volts;

  ad7823_model adc (
    .convst_n(ad_convst), .sclk(ad_sclk), .vin_code(y_code), .dout(ad_data),
    .conversions(conversions), .errors(adc_errors), .last_code(last_code)
  );
  ad7303_model dac (
    .sync_n(dac_sync), .sclk(dac_sclk), .din(dac_din),
    .word(word), .frames(frames), .errors(dac_errors), .code_a(code_a), .vout_a(vout_a)
  );
  plant2_model #(.M(0.56)) plant (
    .clk(clk), .rst(reset), .ve(vout_a), .y(y_volts), .code(y_code)
  );

  always #10 clk = ~clk;   // 50 MHz

  localparam int STEP_CYC = 2000000;   // 40 ms per set-point step
  localparam int RUN_CYC  = 3 * STEP_CYC;

  initial begin : watchdog
    repeat (RUN_CYC + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Independent model of the control law, in units of 2^-16.
  longint m_u = 0, m_e1 = 0, m_e2 = 0;
  logic [7:0] code_q [$];
  logic [7:0] ref_q  [$];
  longint     t_q    [$];
  longint cyc = 0, last_frame = -1;
  int n_sat_hi = 0, n_sat_lo = 0, n_int = 0, n_der = 0, n_frames = 0;
  int n_period_ok = 0, n_latency_ok = 0;

  always @(posedge clk) cyc++;

  always @(negedge ad_convst) begin
    #2;
    code_q.push_back(last_code);
    ref_q.push_back(ref_in);
    t_q.push_back(cyc);
  end

  always @(frames) begin
    longint e0, s, lat;
    logic [7:0] c, r;
    #1;
    if (code_q.size() == 0) begin
      check(1'b0, "D/A frame without a conversion");
    end else begin
      c = code_q.pop_front();
      r = ref_q.pop_front();
      lat = cyc - t_q.pop_front();
      e0 = longint'(r) - longint'(c);
      s  = m_u + longint'(B0_DEF) * e0 + longint'(B1_DEF) * m_e1 + longint'(B2_DEF) * m_e2;
      if (e0 != 0 && e0 == m_e1 && e0 == m_e2) n_int++;   // pure integral step
      if (e0 != m_e1) n_der++;
      m_u = s; m_e2 = m_e1; m_e1 = e0;
      if (m_u < 0) n_sat_lo++;
      else if (m_u >= 256 * 65536) n_sat_hi++;
      n_frames++;
      check(word == {DAC_CTRL_A, u_code(m_u)},
            $sformatf("frame %04h expected u=%0d", word, u_code(m_u)));
      check(u == u_code(m_u), "u pin");
      check(reading == c, "reading pin");
      // CONVST falling edge to SYNC rising edge: 2 (CONVST low) + 200
      // (conversion) + 48 (8 SCLK) + 1 (reading) + 32 (frame) clocks; the
      // PID step itself adds the one clock from `reading` to `u`, and the
      // D/A frame starts in the clock in which u appears.
      if (lat == 283) n_latency_ok++;
      else check(1'b0, $sformatf("conversion-to-output delay %0d clocks", lat));
      if (last_frame >= 0) begin
        if (cyc - last_frame == ADC_PERIOD_CYC) n_period_ok++;
        else check(1'b0, $sformatf("sample period %0d clocks", cyc - last_frame));
      end
      last_frame = cyc;
    end
  end

  function automatic logic [7:0] u_code(longint uu);
    longint i;
    i = uu >>> 16;
    return (i < 0) ? 8'd0 : (i > 255) ? 8'd255 : 8'(i);
  endfunction

  task automatic settle_check(input logic [7:0] target, input string what);
    int lo, hi;
    lo = 255; hi = 0;
    repeat (20) begin
      repeat (ADC_PERIOD_CYC) @(posedge clk);
      if (reading < lo) lo = reading;
      if (reading > hi) hi = reading;
    end
    $display("%s: set point %0d, reading %0d..%0d, u %0d", what, target, lo, hi, u);
    check(lo + 2 >= target && hi <= target + 2, $sformatf("%s settles on the set point", what));
  endtask

  initial begin
    reset = 1'b1; ref_in = 8'd0;
    repeat (5) @(posedge clk);
    #1 reset = 1'b0;
    // The set point changes just after a conversion starts, so that each
    // sample's error uses one set point throughout.
    @(negedge ad_convst) #1 ref_in = 8'd102;      // 2 V step
    repeat (STEP_CYC - 6000) @(posedge clk);
    settle_check(8'd102, "step to 2 V");
    @(negedge ad_convst) #1 ref_in = 8'd20;
    repeat (STEP_CYC - 6000) @(posedge clk);
    settle_check(8'd20, "step down");
    @(negedge ad_convst) #1 ref_in = 8'd102;
    repeat (STEP_CYC - 6000) @(posedge clk);
    settle_check(8'd102, "step up again");
    #2;
    check(adc_errors == 0, $sformatf("%0d A/D protocol errors", adc_errors));
    check(dac_errors == 0, $sformatf("%0d D/A protocol errors", dac_errors));
    $display("conversions=%0d frames=%0d period_ok=%0d latency_ok=%0d", conversions, n_frames, n_period_ok, n_latency_ok);
    $display("clamp_high=%0d clamp_low=%0d integral_only=%0d derivative=%0d", n_sat_hi, n_sat_lo, n_int, n_der);
    check(n_frames > 1000, "D/A frames");
    check(n_period_ok > 1000, "185 kS/s sample period");
    check(n_latency_ok > 1000, "conversion-to-output delay");
    check(n_sat_hi > 0, "clamp at the top occurred");
    check(n_sat_lo > 0, "clamp at the bottom occurred");
    check(n_int > 0, "integral-only steps occurred");
    check(n_der > 0, "derivative steps occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
