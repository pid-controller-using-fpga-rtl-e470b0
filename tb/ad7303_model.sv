// ad7303_model: behavioural model of channel A of the AD7303 dual 8-bit
// serial D/A converter, for testbenches only (the real part is analog).
//
// While sync_n is low, din is taken on each rising edge of sclk, MSB first.
// When sync_n returns high after exactly 16 bits the word is complete:
// `word` holds it, `frames` counts it and, if the control byte selects
// channel A with CR1 CR0 = 11, `code_a` takes the data byte and
// `vout_a` = 2 * VREF * code/256 volts. A frame of any other length, or an
// sclk faster than 30 MHz, is counted in `errors`.
`timescale 1ns / 1ps
module ad7303_model #(
  parameter real VREF = 2.5
) (
  input  logic        sync_n,
  input  logic        sclk,
  input  logic        din,
  output logic [15:0] word,
  output int          frames,
  output int          errors,
  output logic [7:0]  code_a,
  output real         vout_a
);
  logic [15:0] sh;
  int          nbits;
  realtime     t_last;

  initial begin
    word   = '0;
    frames = 0;
    errors = 0;
    code_a = '0;
    vout_a = 0.0;
    sh     = '0;
    nbits  = 0;
    t_last = -1000.0;
  end

  always @(negedge sync_n) nbits = 0;

  always @(posedge sclk) begin
    if (!sync_n) begin
      if ($realtime - t_last < 33.3) errors = errors + 1;
      sh    = {sh[14:0], din};
      nbits = nbits + 1;
    end
    t_last = $realtime;
  end

  always @(posedge sync_n) begin
    if (nbits == 16) begin
      word   = sh;
      frames = frames + 1;
      if (sh[10] == 1'b0 && sh[9:8] == 2'b11) begin
        code_a = sh[7:0];
        vout_a = 2.0 * VREF * real'(sh[7:0]) / 256.0;
      end
    end else if (nbits != 0) begin
      errors = errors + 1;
    end
  end
endmodule
