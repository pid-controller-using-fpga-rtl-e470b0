// tb_adia: self-checking testbench for the AD7823 interface adapter.
//
// Connects the adapter to a behavioural AD7823 whose input code changes to
// a new random value in every period. Checks that each `reading` equals the
// code the converter sampled at its CONVST edge, that a new reading arrives
// exactly every 270 clocks (5.4 us at 50 MHz, 185 kS/s), that CONVST is
// low for 2 clocks per period, that exactly eight SCLK pulses are given per
// period, and that the converter saw no protocol violation (SCLK during
// CONVST or before the 4 us conversion time).
`timescale 1ns / 1ps
module tb_adia;
  import pid_pkg::*;

  logic       clk = 1'b0;
  logic       rst;
  logic       ad_data, ad_convst, ad_sclk, valid;
  logic [7:0] reading;
  logic [7:0] vin_code;
  int         conversions, adc_errors;
  logic [7:0] last_code;

  int checks = 0, failures = 0;

  adia dut (.*);

  ad7823_model adc (
    .convst_n(ad_convst), .sclk(ad_sclk), .vin_code(vin_code), .dout(ad_data),
    .conversions(conversions), .errors(adc_errors), .last_code(last_code)
  );

  always #10 clk = ~clk;   // 50 MHz

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  // Clock-count bookkeeping.
  longint cyc = 0, last_valid = -1;
  int     sclk_rises = 0, convst_low = 0, nvalid = 0;
  logic   sclk_q = 1'b0;

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (ad_sclk && !sclk_q) sclk_rises++;
      sclk_q <= ad_sclk;
      if (!ad_convst) convst_low++;
      if (valid) begin
        nvalid++;
        check(reading == last_code,
              $sformatf("reading %02h expected %02h", reading, last_code));
        if (last_valid >= 0)
          check(cyc - last_valid == ADC_PERIOD_CYC,
                $sformatf("period %0d clocks", cyc - last_valid));
        if (nvalid > 1) begin
          check(sclk_rises == 8, $sformatf("%0d SCLK pulses", sclk_rises));
          check(convst_low == ADC_CONVST_CYC, $sformatf("CONVST low %0d", convst_low));
        end
        sclk_rises = 0;
        convst_low = 0;
        last_valid = cyc;
        vin_code   = 8'($urandom);   // next period's analog input
      end
    end
  end

  initial begin
    vin_code = 8'hA5;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    wait (nvalid >= 200);
    @(posedge clk);
    check(adc_errors == 0, $sformatf("%0d converter protocol errors", adc_errors));
    check(conversions >= 200, "conversions started");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
