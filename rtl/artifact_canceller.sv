// artifact_canceller: multiplexed LMS artifact canceller and the artifact
// subtraction point of the recording input.
//
// One lms_filter_bank per stimulator learns that stimulator's artifact on
// the channels assigned to it. For the channel now selected, the banks'
// outputs are added (artifacts of several stimulators are assumed to
// superimpose linearly in tissue, so overlapping pulses are cancelled
// together) to give art_out, the "ART Out" code. At the subtraction
// point art_out is added to the delta-encoder code dac_in, and the sum,
// saturated to CODE_W bits, is the CDAC code that the front-end subtracts
// from the electrode signal before amplification. Every bank sees the
// same ADC residual as its error, so each converges on the part of the
// residual that is correlated with its own trigger.
//
// With cancel_en low the canceller output is not applied and the banks do
// not adapt (otherwise they would integrate an error they cannot reduce).
// The bank/summing structure follows the chip description; the
// saturation and the cancel_en behaviour are this design's choices.
//
// live is high while at least one bank applies a stored word to the
// selected channel; the delta encoder holds that channel's code meanwhile
// (see bbci_top).
//
// Timing: art_out follows the banks (valid from the cycle after upd);
// cdac_code is registered and valid from two cycles after upd until two
// cycles after the next upd. The ADC must sample after that.
module artifact_canceller #(
  parameter int unsigned NUM_CH   = 64,
  parameter int unsigned NUM_STIM = 4,
  parameter int unsigned NUM_TAPS = 32,
  parameter int unsigned SLOTS    = 4,
  parameter int unsigned CODE_W   = 10,
  parameter int unsigned ADC_W    = 8,
  localparam int unsigned CH_W    = $clog2(NUM_CH)
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  input  logic                                     clr,
  input  logic                                     cancel_en,
  input  logic [NUM_STIM-1:0][SLOTS-1:0]           slot_en,
  input  logic [NUM_STIM-1:0][SLOTS-1:0][CH_W-1:0] slot_ch,
  input  logic [NUM_STIM-1:0][3:0]                 mu_shift,
  input  logic [NUM_STIM-1:0]                      adapt_en,
  input  logic [NUM_STIM-1:0]                      trig,
  input  logic                                     frame_tick,
  input  logic                                     upd,
  input  logic                                     adc_valid,
  input  logic [CH_W-1:0]                          ch,
  input  logic signed [ADC_W-1:0]                  adc,
  input  logic signed [CODE_W-1:0]                 dac_in,
  output logic signed [CODE_W-1:0]                 art_out,
  output logic signed [CODE_W-1:0]                 cdac_code,
  output logic [NUM_STIM-1:0]                      busy,
  output logic                                     live
);

  localparam int unsigned SUM_W = CODE_W + $clog2(NUM_STIM + 1) + 1;

  logic signed [CODE_W-1:0] bank_out [NUM_STIM];
  logic [NUM_STIM-1:0]      bank_live;
  logic signed [SUM_W-1:0]  art_sum;
  logic signed [SUM_W-1:0]  sub_sum;

  for (genvar s = 0; s < NUM_STIM; s++) begin : g_bank
    lms_filter_bank #(
      .NUM_CH(NUM_CH), .NUM_TAPS(NUM_TAPS), .SLOTS(SLOTS),
      .CODE_W(CODE_W), .ADC_W(ADC_W)
    ) u_bank (
      .clk, .rst_n, .clr,
      .slot_en    (slot_en[s]),
      .slot_ch    (slot_ch[s]),
      .mu_shift   (mu_shift[s]),
      .adapt_en   (adapt_en[s] && cancel_en),
      .trig       (trig[s]),
      .frame_tick,
      .upd,
      .adc_valid,
      .ch,
      .adc,
      .art_out    (bank_out[s]),
      .busy       (busy[s]),
      .live       (bank_live[s])
    );
  end

  function automatic logic signed [CODE_W-1:0] sat(input logic signed [SUM_W-1:0] v);
    if (v > SUM_W'((1 <<< (CODE_W-1)) - 1))  return {1'b0, {(CODE_W-1){1'b1}}};
    else if (v < -SUM_W'(1 <<< (CODE_W-1)))  return {1'b1, {(CODE_W-1){1'b0}}};
    else                                      return v[CODE_W-1:0];
  endfunction

  always_comb begin
    art_sum = '0;
    for (int s = 0; s < NUM_STIM; s++) art_sum += SUM_W'(bank_out[s]);
    art_out = cancel_en ? sat(art_sum) : '0;
    live    = cancel_en && (bank_live != '0);
    sub_sum = SUM_W'(dac_in) + SUM_W'(art_out);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cdac_code <= '0;
    else        cdac_code <= sat(sub_sum);
  end

endmodule
