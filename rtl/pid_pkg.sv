// pid_pkg: widths, fixed-point formats, default tuning and timing constants
// shared by the PID controller, its converter adapters and their testbenches.
//
// Samples are 8-bit straight-binary codes, as delivered by the AD7823 A/D
// converter and accepted by the AD7303 D/A converter. The coefficients b0,
// b1, b2 of the incremental PID law are signed fixed point with COEF_FRAC
// fraction bits; the held control value u_{k-1} is a signed number with
// U_FRAC fraction bits and U_INT integer bits, wide enough that a small
// integral term (b0+b1+b2 of a few thousandths) is not lost and that the
// value can run past the D/A range without wrapping. The 8-bit width follows
// the converters; the fixed-point formats are this design's choice.
// Timing constants assume the 50 MHz board clock (20 ns per cycle).
package pid_pkg;

  localparam int unsigned DATA_W    = 8;   // converter sample width
  localparam int unsigned COEF_W    = 32;  // coefficient width, signed
  localparam int unsigned COEF_FRAC = 16;  // coefficient fraction bits
  localparam int unsigned U_FRAC    = 16;  // fraction bits kept in u_{k-1}
  localparam int unsigned U_INT     = 16;  // integer bits of u_{k-1}, signed

  typedef logic        [DATA_W-1:0] sample_t;  // 0..255 code
  typedef logic signed [COEF_W-1:0] coef_t;    // Q15.16 by default
  typedef logic signed [DATA_W:0]   err_t;     // ref - y, -255..255

  // Converts a real gain to the coefficient format (elaboration time only).
  function automatic coef_t to_coef(real x);
    return coef_t'($rtoi(x * real'(longint'(1) << COEF_FRAC) + ((x < 0.0) ? -0.5 : 0.5)));
  endfunction

  // Coefficients of the incremental law from the tuning parameters:
  //   b0 = Kp(1 + Td/T), b1 = Kp(-1 + T/Ti - 2Td/T), b2 = Kp*Td/T
  // (Ti <= 0 means no integral action). Times are in seconds.
  function automatic real pid_b0(real kp, real td, real t);
    return kp * (1.0 + td / t);
  endfunction
  function automatic real pid_b1(real kp, real ti, real td, real t);
    return kp * (-1.0 + ((ti > 0.0) ? t / ti : 0.0) - 2.0 * td / t);
  endfunction
  function automatic real pid_b2(real kp, real td, real t);
    return kp * td / t;
  endfunction

  // Default tuning, that of the PID closed-loop experiment: Kp = 2,
  // KD = 1 taken as Kp*Td/T (Td = T/2), KI = 0.5 taken as Kp/Ti in 1/ms
  // (Ti = 4 ms). T is the 5.4 us acquisition period.
  localparam real KP_DEF = 2.0;
  localparam real T_DEF  = 5.4e-6;
  localparam real TI_DEF = 4.0e-3;
  localparam real TD_DEF = 2.7e-6;
  localparam coef_t B0_DEF = to_coef(pid_b0(KP_DEF, TD_DEF, T_DEF));
  localparam coef_t B1_DEF = to_coef(pid_b1(KP_DEF, TI_DEF, TD_DEF, T_DEF));
  localparam coef_t B2_DEF = to_coef(pid_b2(KP_DEF, TD_DEF, T_DEF));

  // AD7823 acquisition (50 MHz clock): the whole conversion and read takes
  // 5.4 us = 270 cycles, of which 4 us = 200 cycles is the conversion.
  localparam int unsigned ADC_PERIOD_CYC = 270;
  localparam int unsigned ADC_CONVST_CYC = 2;    // CONVST low pulse
  localparam int unsigned ADC_CONV_CYC   = 200;  // conversion wait
  localparam int unsigned ADC_SCLK_HALF  = 3;    // 8.33 MHz SCLK

  // AD7303 write: 16 bits at SCLK = clk/2 (25 MHz) plus 2 cycles of SYNC
  // high make one 680 ns frame (34 cycles, 1.47 MHz update rate).
  localparam int unsigned DAC_SCLK_HALF = 1;
  localparam int unsigned DAC_GAP_CYC   = 2;

  // AD7303 control byte (bits 15..8 of the serial word):
  // INT/EXT, X, LDAC, PDB, PDA, A/B, CR1, CR0.
  // Default: internal reference, both channels powered, channel A,
  // CR1 CR0 = 11 (load the input register and update the DAC register).
  localparam logic [7:0] DAC_CTRL_A = 8'b0000_0011;

endpackage
