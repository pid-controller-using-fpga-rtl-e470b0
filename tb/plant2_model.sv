// plant2_model: behavioural model of the second-order analog plant used to
// exercise the controller in closed loop, for testbenches only.
//
// Solves  y'' + 2*M*W0*y' + W0^2*y = W0^2*KS*ve  by semi-implicit Euler,
// one step of DT_S seconds per rising clock edge. The defaults describe a
// Sallen-Key style filter (R = 12 kOhm, C1 = 6.8 nF, C2 = 22 nF) followed by
// an inverting stage of gain R2/R1 = 10k/15k: KS = 0.67, W0 = 6.81e3 rad/s,
// M = 1.80 (swapping C1 and C2 gives M = 0.56). `ve` is the D/A output in
// volts; `code` is y quantised for an 8-bit A/D converter with a full scale
// of VFS volts (straight binary, clamped to 0..255).
`timescale 1ns / 1ps
module plant2_model #(
  parameter real KS   = 0.67,
  parameter real W0   = 6.81e3,
  parameter real M    = 1.80,
  parameter real DT_S = 20.0e-9,
  parameter real VFS  = 5.0
) (
  input  logic       clk,
  input  logic       rst,
  input  real        ve,
  output real        y,
  output logic [7:0] code
);
  real v;   // dy/dt

  initial begin
    y = 0.0;
    v = 0.0;
  end

  always @(posedge clk) begin
    if (rst) begin
      y = 0.0;
      v = 0.0;
    end else begin
      v = v + DT_S * (W0 * W0 * (KS * ve - y) - 2.0 * M * W0 * v);
      y = y + DT_S * v;
    end
  end

  always_comb begin
    real c;
    c = y * 256.0 / VFS;
    if (c < 0.0)        code = 8'd0;
    else if (c > 255.0) code = 8'd255;
    else                code = 8'($rtoi(c));
  end
endmodule
