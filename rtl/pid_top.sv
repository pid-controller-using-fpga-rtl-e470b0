// pid_top: FPGA PID controller with serial converter interfaces.
//
// Closes a feedback loop around an analog plant: the A/D interface adapter
// (adia) reads the plant output y from an AD7823 every 5.4 us, the PID
// datapath (pid_core) computes the new control value u from the digital
// set point `ref` and y, and the D/A interface adapter (daia) writes u to
// channel A of an AD7303. The pins are those of the controller block:
// inputs ref[7:0], ad_data, clk, reset; outputs ad_convst, ad_sclk,
// dac_din, dac_sclk, dac_sync, reading[7:0] (the last A/D sample) and
// u[7:0] (the last control value).
//
// Timing at 50 MHz: one sample every 270 clocks (185 kS/s); u is updated
// one clock after the reading and its D/A frame starts in the next clock,
// ending 34 clocks (680 ns) later. The coefficients b0, b1, b2 are fixed
// by parameters (signed, pid_pkg::COEF_FRAC fraction bits); their defaults
// are the PID tuning Kp = 2, KI = 0.5, KD = 1 (b0 = 3, b1 = -3.5, b2 = 1).
// Reset is active high and synchronous.
module pid_top
  import pid_pkg::*;
#(
  parameter coef_t       B0         = B0_DEF,
  parameter coef_t       B1         = B1_DEF,
  parameter coef_t       B2         = B2_DEF,
  parameter int unsigned PERIOD_CYC = ADC_PERIOD_CYC
) (
  input  logic          clk,
  input  logic          reset,
  input  sample_t       ref_in,     // set point code ("ref" on the block)
  input  logic          ad_data,
  output logic          ad_convst,
  output logic          ad_sclk,
  output logic          dac_din,
  output logic          dac_sclk,
  output logic          dac_sync,
  output sample_t       reading,
  output sample_t       u
);

  logic y_valid, u_valid;

  adia #(.PERIOD_CYC(PERIOD_CYC)) u_adia (
    .clk       (clk),
    .rst       (reset),
    .ad_data   (ad_data),
    .ad_convst (ad_convst),
    .ad_sclk   (ad_sclk),
    .reading   (reading),
    .valid     (y_valid)
  );

  pid_core u_pid (
    .clk     (clk),
    .rst     (reset),
    .ref_in  (ref_in),
    .y       (reading),
    .y_valid (y_valid),
    .b0      (B0),
    .b1      (B1),
    .b2      (B2),
    .u       (u),
    .u_valid (u_valid)
  );

  daia u_daia (
    .clk      (clk),
    .rst      (reset),
    .data     (u),
    .load     (u_valid),
    .dac_sync (dac_sync),
    .dac_sclk (dac_sclk),
    .dac_din  (dac_din),
    .busy     ()
  );

endmodule
