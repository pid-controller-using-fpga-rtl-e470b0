// pid_loop_bench: one closed control loop for testbenches: the controller
// (pid_top) with the given tuning, behavioural AD7823 and AD7303 models and
// the second-order plant with damping M. It reports the largest and the
// latest A/D reading and the converters' protocol error counts.
//
// Tuning is given as in the discrete PID law: KP, TI (seconds, 0 for no
// integral action), TD (seconds) and the sampling period T_S; the
// coefficients b0, b1, b2 are derived with the package functions.
`timescale 1ns / 1ps
module pid_loop_bench
  import pid_pkg::*;
#(
  parameter real KP  = 2.0,
  parameter real TI  = 0.0,
  parameter real TD  = 0.0,
  parameter real T_S = T_DEF,
  parameter real M   = 1.80
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] ref_in,
  output logic [7:0] reading,
  output logic [7:0] peak,
  output int         errors
);
  localparam coef_t B0 = to_coef(pid_b0(KP, TD, T_S));
  localparam coef_t B1 = to_coef(pid_b1(KP, TI, TD, T_S));
  localparam coef_t B2 = to_coef(pid_b2(KP, TD, T_S));

  logic        ad_data, ad_convst, ad_sclk, dac_din, dac_sclk, dac_sync;
  logic [7:0]  u, y_code, last_code, code_a;
  logic [15:0] word;
  int          conversions, adc_errors, frames, dac_errors;
  real         vout_a, y_volts;

  pid_top #(.B0(B0), .B1(B1), .B2(B2)) ctrl (
    .clk(clk), .reset(rst), .ref_in(ref_in), .ad_data(ad_data),
    .ad_convst(ad_convst), .ad_sclk(ad_sclk), .dac_din(dac_din),
    .dac_sclk(dac_sclk), .dac_sync(dac_sync), .reading(reading), .u(u)
  );
  ad7823_model adc (
    .convst_n(ad_convst), .sclk(ad_sclk), .vin_code(y_code), .dout(ad_data),
    .conversions(conversions), .errors(adc_errors), .last_code(last_code)
  );
  ad7303_model dac (
    .sync_n(dac_sync), .sclk(dac_sclk), .din(dac_din),
    .word(word), .frames(frames), .errors(dac_errors), .code_a(code_a), .vout_a(vout_a)
  );
  plant2_model #(.M(M)) plant (
    .clk(clk), .rst(rst), .ve(vout_a), .y(y_volts), .code(y_code)
  );

  always_ff @(posedge clk)
    if (rst) peak <= '0;
    else if (reading > peak) peak <= reading;

  assign errors = adc_errors + dac_errors;
endmodule
