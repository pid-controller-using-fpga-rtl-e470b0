// ad7823_model: behavioural model of the AD7823 8-bit serial A/D converter,
// for testbenches only (not synthesizable; the real part is analog).
//
// The falling edge of convst_n samples `vin_code` (the already-quantised
// input, straight binary) and starts a conversion of T_CONV_NS. The MSB is
// on dout from then on; each falling edge of sclk moves dout to the next
// bit, MSB first. The model counts protocol violations in `errors`: an
// sclk rising edge while convst_n is low, or before the conversion time
// has passed. `conversions` counts started conversions.
`timescale 1ns / 1ps
module ad7823_model #(
  parameter real T_CONV_NS = 4000.0
) (
  input  logic       convst_n,
  input  logic       sclk,
  input  logic [7:0] vin_code,
  output logic       dout,
  output int         conversions,
  output int         errors,
  output logic [7:0] last_code
);
  logic [7:0] sh;
  realtime    t_start;

  initial begin
    conversions = 0;
    errors      = 0;
    sh          = '0;
    dout        = 1'b0;
    last_code   = '0;
    t_start     = 0;
  end

  always @(negedge convst_n) begin
    t_start     = $realtime;
    sh          = vin_code;
    last_code   = vin_code;
    dout        = vin_code[7];
    conversions = conversions + 1;
  end

  always @(posedge sclk) begin
    if (!convst_n) errors = errors + 1;
    else if (conversions > 0 && ($realtime - t_start) < T_CONV_NS) errors = errors + 1;
  end

  always @(negedge sclk) begin
    sh   = {sh[6:0], 1'b0};
    dout = sh[7];
  end
endmodule
