// daia: D/A interface adapter for the AD7303 dual 8-bit serial D/A converter.
//
// A `load` pulse hands the adapter an 8-bit code. The adapter sends the
// converter one 16-bit word, MSB first: the 8-bit control byte CTRL
// followed by the data byte. dac_sync is held low for the 16 bits; each bit
// is put on dac_din while dac_sclk is low and held through the SCLK_HALF
// clocks in which dac_sclk is high, so the converter takes it on the rising
// edge. After the last bit dac_sync returns high for GAP_CYC clocks. With
// the defaults at 50 MHz (SCLK = 25 MHz, within the converter's 30 MHz) a
// frame takes 34 clocks = 680 ns, i.e. up to 1.47 M updates per second.
//
// A `load` that arrives while a frame is under way is kept (the latest one
// wins) and sent as soon as the frame and its gap have finished; `busy` is
// high from the first clock of a frame to the end of its gap.
//
// The 16-bit word of 8 control and 8 data bits, the 680 ns frame and the
// rate follow the converter and its stated rates; the control byte value,
// the SCLK phase and the handling of a load during a frame are this
// design's choices.
module daia
  import pid_pkg::*;
#(
  parameter int unsigned W_DATA    = DATA_W,
  parameter int unsigned SCLK_HALF = DAC_SCLK_HALF,
  parameter int unsigned GAP_CYC   = DAC_GAP_CYC,
  parameter logic [7:0]  CTRL      = DAC_CTRL_A
) (
  input  logic              clk,
  input  logic              rst,       // active high
  input  logic [W_DATA-1:0] data,
  input  logic              load,      // one-cycle strobe: send `data`
  output logic              dac_sync,  // frame, active low
  output logic              dac_sclk,
  output logic              dac_din,
  output logic              busy
);

  localparam int unsigned W_WORD = 8 + W_DATA;
  localparam int unsigned W_HALF = (2 * SCLK_HALF > 1) ? $clog2(2 * SCLK_HALF) : 1;
  localparam int unsigned W_GAP  = (GAP_CYC > 1) ? $clog2(GAP_CYC) : 1;

  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_GAP} state_t;

  state_t                      state;
  logic [W_WORD-1:0]           word;
  logic [$clog2(W_WORD)-1:0]   bit_cnt;
  logic [W_HALF-1:0]           half_cnt;
  logic [W_GAP-1:0]            gap_cnt;
  logic [W_DATA-1:0]           pend_data;
  logic                        pend;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      word      <= '0;
      bit_cnt   <= '0;
      half_cnt  <= '0;
      gap_cnt   <= '0;
      pend      <= 1'b0;
      pend_data <= '0;
    end else begin
      if (load) begin
        pend      <= 1'b1;
        pend_data <= data;
      end
      unique case (state)
        S_IDLE: begin
          if (load || pend) begin
            word     <= {CTRL, load ? data : pend_data};
            pend     <= 1'b0;
            bit_cnt  <= '0;
            half_cnt <= '0;
            state    <= S_SHIFT;
          end
        end
        S_SHIFT: begin
          if (half_cnt == W_HALF'(2 * SCLK_HALF - 1)) begin
            half_cnt <= '0;
            word     <= {word[W_WORD-2:0], 1'b0};
            bit_cnt  <= bit_cnt + 1'b1;
            if (bit_cnt == ($bits(bit_cnt))'(W_WORD - 1)) begin
              state   <= S_GAP;
              gap_cnt <= '0;
            end
          end else begin
            half_cnt <= half_cnt + 1'b1;
          end
        end
        S_GAP: begin
          gap_cnt <= gap_cnt + 1'b1;
          if (gap_cnt == W_GAP'(GAP_CYC - 1)) begin
            // A code that arrived during the frame starts the next frame
            // straight away, so frames follow each other without a pause.
            if (load || pend) begin
              word     <= {CTRL, load ? data : pend_data};
              pend     <= 1'b0;
              bit_cnt  <= '0;
              half_cnt <= '0;
              state    <= S_SHIFT;
            end else begin
              state <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Outputs are decoded from the state registers: SYNC low while shifting,
  // SCLK high in the second half of each bit slot, DIN the word's MSB.
  assign dac_sync = (state != S_SHIFT);
  assign dac_sclk = (state == S_SHIFT) && (half_cnt >= W_HALF'(SCLK_HALF));
  assign dac_din  = (state == S_SHIFT) && word[W_WORD-1];
  assign busy     = (state != S_IDLE);

  // DIN may only change while SCLK is low.
  a_din_stable: assert property (@(posedge clk) disable iff (rst)
                                 (dac_sclk && $past(dac_sclk) && !dac_sync)
                                 |-> $stable(dac_din));

endmodule
