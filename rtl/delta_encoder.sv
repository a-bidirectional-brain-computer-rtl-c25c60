// delta_encoder: per-channel delta-encoding register of the multiplexed
// recording front-end.
//
// The front-end does not digitise the electrode voltage directly. A 10-bit
// CDAC at the amplifier input subtracts a running estimate of each
// channel's slow signal content, and the 8-bit ADC only sees the
// remainder. This block holds that estimate for every channel (NUM_CH
// words of CODE_W bits) and integrates the ADC remainder into it:
//
//   dac[R] <= sat( dac[R] + (adc >>> shift) )
//
// where shift converts ADC LSBs to CDAC LSBs (4 when the 8-bit ADC range
// spans 16 CDAC steps, giving a 14-bit reconstructed sample dac*16 + adc).
// The integrate-and-feed-back structure follows the chip description; the
// scaling, saturation and truncating shift are this design's choices.
//
// Timing: in the cycle after a channel tick (upd high) adc belongs to
// prev_ch and ch is the channel now selected. With adc_valid and en high
// the word of prev_ch is updated, and dac_out is loaded with the word of
// ch, valid from the next cycle until the cycle after the next upd. With
// en low dac_out is 0 and words are cleared as their channel passes.
module delta_encoder #(
  parameter int unsigned NUM_CH = 64,
  parameter int unsigned CODE_W = 10,
  parameter int unsigned ADC_W  = 8,
  localparam int unsigned CH_W  = $clog2(NUM_CH)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic [3:0]               shift,
  input  logic                     upd,
  input  logic                     adc_valid,
  input  logic [CH_W-1:0]          ch,
  input  logic [CH_W-1:0]          prev_ch,
  input  logic signed [ADC_W-1:0]  adc,
  output logic signed [CODE_W-1:0] dac_out
);

  localparam int unsigned SUM_W = CODE_W + 2;

  logic signed [CODE_W-1:0] mem_q [NUM_CH];
  logic signed [ADC_W-1:0]  step;
  logic signed [SUM_W-1:0]  sum;
  logic signed [CODE_W-1:0] new_word;

  always_comb begin
    step = adc >>> shift;
    sum  = SUM_W'(mem_q[prev_ch]) + SUM_W'(step);
    if (sum > SUM_W'((1 <<< (CODE_W-1)) - 1))   new_word = {1'b0, {(CODE_W-1){1'b1}}};
    else if (sum < -SUM_W'(1 <<< (CODE_W-1)))   new_word = {1'b1, {(CODE_W-1){1'b0}}};
    else                                         new_word = sum[CODE_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_CH; i++) mem_q[i] <= '0;
      dac_out <= '0;
    end else if (upd) begin
      if (!en) begin
        mem_q[prev_ch] <= '0;
        dac_out        <= '0;
      end else begin
        if (adc_valid) mem_q[prev_ch] <= new_word;
        // forward the fresh word when only one channel is scanned
        dac_out <= (adc_valid && prev_ch == ch) ? new_word : mem_q[ch];
      end
    end
  end

endmodule
