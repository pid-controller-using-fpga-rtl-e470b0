// pid_core: incremental (velocity-form) discrete PID datapath.
//
// Computes, once per sample,
//     e_k = ref - y_k
//     u_k = u_{k-1} + b0*e_k + b1*e_{k-1} + b2*e_{k-2}
// with b0 = Kp(1 + Td/T), b1 = Kp(-1 + T/Ti - 2Td/T), b2 = Kp*Td/T.
// The structure follows the controller's block diagram: one subtractor,
// three combinational multipliers, three adders and three registers
// (e_{k-1}, e_{k-2}, u_{k-1}). The adders are arranged as in that diagram:
// (b0*e_k + b1*e_{k-1}) and (u_{k-1} + b2*e_{k-2}) are summed by the third.
// Every operator is used in the single cycle in which a sample arrives.
//
// Design choices not fixed by the controller's description: the
// coefficients are signed fixed point (F_COEF fraction bits); u_{k-1} is
// kept as a signed number with F_U fraction bits and U_INT integer bits,
// saturating at the ends of that range instead of wrapping. It is not
// clamped to the D/A range, so a P or PD controller keeps u_k = Kp*e_k +
// const even after the output has been limited. Only the output u, the
// integer part of u_{k-1}, is clamped to the 8-bit D/A range 0..255.
//
// Interface and timing: y and ref are sampled when y_valid is high.
// u/u_valid appear one clock later (u_valid is a one-cycle pulse), so the
// controller latency is one clock (20 ns at 50 MHz). An active-high
// synchronous reset clears all three registers.
module pid_core
  import pid_pkg::*;
#(
  parameter int unsigned W_DATA = DATA_W,
  parameter int unsigned W_COEF = COEF_W,
  parameter int unsigned F_COEF = COEF_FRAC,
  parameter int unsigned F_U    = U_FRAC,
  parameter int unsigned I_U    = U_INT
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic        [W_DATA-1:0] ref_in,   // set point code
  input  logic        [W_DATA-1:0] y,        // measured code
  input  logic                     y_valid,  // new sample strobe
  input  logic signed [W_COEF-1:0] b0,
  input  logic signed [W_COEF-1:0] b1,
  input  logic signed [W_COEF-1:0] b2,
  output logic        [W_DATA-1:0] u,        // control code to the DAC
  output logic                     u_valid
);

  localparam int unsigned W_ERR  = W_DATA + 1;
  localparam int unsigned W_PROD = W_ERR + W_COEF;
  localparam int unsigned W_U    = I_U + F_U;      // stored u, signed
  // Sum width: the wider of products and u_{k-1} (in F_COEF scale), plus
  // guard bits for the three additions.
  localparam int unsigned W_UA   = W_U + ((F_COEF > F_U) ? (F_COEF - F_U) : 0);
  localparam int unsigned W_ACC  = ((W_PROD > W_UA) ? W_PROD : W_UA) + 3;

  // Limits of u_{k-1}, sign-extended to the sum width.
  localparam logic signed [W_ACC-1:0] U_MAX_ACC =
    W_ACC'(signed'({1'b0, {(W_U-1){1'b1}}}));
  localparam logic signed [W_ACC-1:0] U_MIN_ACC =
    W_ACC'(signed'({1'b1, {(W_U-1){1'b0}}}));
  localparam logic signed [I_U-1:0]   U_OUT_MAX = I_U'(signed'({1'b0, {W_DATA{1'b1}}}));

  logic signed [W_ERR-1:0]  e_k, e_k1, e_k2;
  logic signed [W_U-1:0]    u_k1;                  // u_{k-1}
  logic signed [W_PROD-1:0] p0, p1, p2;
  logic signed [W_ACC-1:0]  s01, s2u, u_sum, u_prev_ext;
  logic signed [W_U-1:0]    u_next;

  // Subtractor.
  assign e_k = signed'({1'b0, ref_in}) - signed'({1'b0, y});

  // Three combinational multipliers.
  assign p0 = e_k  * b0;
  assign p1 = e_k1 * b1;
  assign p2 = e_k2 * b2;

  // u_{k-1} aligned to the products' F_COEF fraction bits.
  always_comb begin
    u_prev_ext = W_ACC'(u_k1);
    if (F_COEF >= F_U) u_prev_ext = u_prev_ext <<< (F_COEF - F_U);
    else               u_prev_ext = u_prev_ext >>> (F_U - F_COEF);
  end

  // Three adders.
  assign s01   = W_ACC'(p0) + W_ACC'(p1);
  assign s2u   = u_prev_ext + W_ACC'(p2);
  assign u_sum = s01 + s2u;

  // Rescale to F_U fraction bits and saturate to the register's range.
  always_comb begin
    logic signed [W_ACC-1:0] scaled;
    if (F_COEF >= F_U) scaled = u_sum >>> (F_COEF - F_U);
    else               scaled = u_sum <<< (F_U - F_COEF);
    if (scaled > U_MAX_ACC)
      u_next = {1'b0, {(W_U-1){1'b1}}};
    else if (scaled < U_MIN_ACC)
      u_next = {1'b1, {(W_U-1){1'b0}}};
    else
      u_next = scaled[W_U-1:0];
  end

  // Three registers: e_{k-1}, e_{k-2}, u_{k-1}.
  always_ff @(posedge clk) begin
    if (rst) begin
      e_k1    <= '0;
      e_k2    <= '0;
      u_k1    <= '0;
      u_valid <= 1'b0;
    end else begin
      u_valid <= y_valid;
      if (y_valid) begin
        e_k1 <= e_k;
        e_k2 <= e_k1;
        u_k1 <= u_next;
      end
    end
  end

  // Output: integer part of u_{k-1}, clamped to the D/A range.
  always_comb begin
    logic signed [I_U-1:0] u_int;
    u_int = u_k1[W_U-1 -: I_U];
    if (u_int < 0)
      u = '0;
    else if (u_int > U_OUT_MAX)
      u = '1;
    else
      u = u_int[W_DATA-1:0];
  end

endmodule
