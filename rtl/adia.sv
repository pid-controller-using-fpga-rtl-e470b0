// adia: A/D interface adapter for the AD7823 8-bit serial A/D converter.
//
// The adapter runs a fixed acquisition cycle of PERIOD_CYC clocks
// (5.4 us at 50 MHz, 185 kS/s) that starts again as soon as reset (the
// "sample" line) is released:
//   CONVST  ad_convst is held low for CONVST_CYC clocks; its falling edge
//           starts a conversion.
//   CONVERT the adapter waits CONV_CYC clocks (4 us) for the converter.
//   SHIFT   eight ad_sclk pulses, each SCLK_HALF clocks low then SCLK_HALF
//           clocks high, read the result MSB first; ad_data is sampled in
//           the last clock of each high half, before the falling edge on
//           which the converter moves to the next bit.
//   IDLE    the rest of the period, ad_convst high and ad_sclk low.
// After the eighth bit the parallel word appears on `reading` together with
// a one-cycle `valid` pulse, and stays until the next word replaces it.
//
// The period, the 4 us conversion time and the MSB-first serial read follow
// the converter and its stated rates; the split of the period, the SCLK rate
// and the sampling point of ad_data are this design's choices.
module adia
  import pid_pkg::*;
#(
  parameter int unsigned W_DATA     = DATA_W,
  parameter int unsigned PERIOD_CYC = ADC_PERIOD_CYC,
  parameter int unsigned CONVST_CYC = ADC_CONVST_CYC,
  parameter int unsigned CONV_CYC   = ADC_CONV_CYC,
  parameter int unsigned SCLK_HALF  = ADC_SCLK_HALF
) (
  input  logic              clk,
  input  logic              rst,        // "sample (reset)" line, active high
  input  logic              ad_data,    // serial data from the converter
  output logic              ad_convst,  // conversion start, active low
  output logic              ad_sclk,    // serial clock to the converter
  output logic [W_DATA-1:0] reading,    // last converted sample
  output logic              valid       // one-cycle pulse: new reading
);

  localparam int unsigned SHIFT_CYC = 2 * SCLK_HALF * W_DATA;
  localparam int unsigned BUSY_CYC  = CONVST_CYC + CONV_CYC + SHIFT_CYC;
  localparam int unsigned W_CNT     = $clog2(PERIOD_CYC + 1);

  typedef enum logic [1:0] {S_CONVST, S_CONVERT, S_SHIFT, S_IDLE} state_t;

  state_t              state;
  logic [W_CNT-1:0]    phase_cnt;   // clocks spent in the current state
  logic [W_CNT-1:0]    period_cnt;  // clocks since the period started
  logic [$clog2(2*SCLK_HALF)-1:0] half_cnt;
  logic [$clog2(W_DATA+1)-1:0]    bit_cnt;
  logic [W_DATA-2:0]   shreg;        // bits received so far

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_CONVST;
      phase_cnt  <= '0;
      period_cnt <= '0;
      half_cnt   <= '0;
      bit_cnt    <= '0;
      shreg      <= '0;
      reading    <= '0;
      valid      <= 1'b0;
      ad_convst  <= 1'b1;
      ad_sclk    <= 1'b0;
    end else begin
      valid      <= 1'b0;
      phase_cnt  <= phase_cnt + 1'b1;
      period_cnt <= (period_cnt == W_CNT'(PERIOD_CYC - 1)) ? '0 : period_cnt + 1'b1;
      unique case (state)
        S_CONVST: begin
          ad_convst <= 1'b0;
          if (phase_cnt == W_CNT'(CONVST_CYC - 1)) begin
            state     <= S_CONVERT;
            phase_cnt <= '0;
          end
        end
        S_CONVERT: begin
          ad_convst <= 1'b1;
          if (phase_cnt == W_CNT'(CONV_CYC - 1)) begin
            state    <= S_SHIFT;
            half_cnt <= '0;
            bit_cnt  <= '0;
          end
        end
        S_SHIFT: begin
          half_cnt <= (half_cnt == ($bits(half_cnt))'(2*SCLK_HALF - 1)) ? '0 : half_cnt + 1'b1;
          // SCLK high during the second half of each bit slot.
          ad_sclk  <= (half_cnt >= ($bits(half_cnt))'(SCLK_HALF - 1)) &&
                      (half_cnt != ($bits(half_cnt))'(2*SCLK_HALF - 1));
          if (half_cnt == ($bits(half_cnt))'(2*SCLK_HALF - 1)) begin
            shreg   <= {shreg[W_DATA-3:0], ad_data};
            bit_cnt <= bit_cnt + 1'b1;
            if (bit_cnt == ($bits(bit_cnt))'(W_DATA - 1)) begin
              reading <= {shreg[W_DATA-2:0], ad_data};
              valid   <= 1'b1;
              state   <= S_IDLE;
            end
          end
        end
        S_IDLE: begin
          ad_sclk <= 1'b0;
          if (period_cnt == W_CNT'(PERIOD_CYC - 1)) begin
            state     <= S_CONVST;
            phase_cnt <= '0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The schedule must fit in one period.
  initial assert (BUSY_CYC < PERIOD_CYC)
    else $error("adia: CONVST+CONVERT+SHIFT (%0d) exceeds the period (%0d)",
                BUSY_CYC, PERIOD_CYC);

  // CONVST and SCLK are never active together.
  a_convst_sclk: assert property (@(posedge clk) disable iff (rst)
                                  !(!ad_convst && ad_sclk));

endmodule
