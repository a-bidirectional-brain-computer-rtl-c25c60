// bbci_top: digital core of a bidirectional neural interface chip with
// 64-channel time-multiplexed recording, four H-bridge current
// stimulators and adaptive stimulus-artifact cancellation.
//
// Recording: a 64:1 multiplexer feeds one CDAC / amplifier / 8-bit SAR ADC
// chain. channel_sequencer steps the multiplexer (mux_sel) once per sample
// tick; the delta_encoder keeps a 10-bit estimate of each channel's slow
// content; the artifact_canceller adds its learned artifact code to it;
// the sum is the CDAC code subtracted at the amplifier input, so the ADC
// only digitises what neither loop predicted. Each sample leaves through
// the serializer as {channel, ADC, DAC, ART}.
//
// Stimulation: four stim_controllers play their programmed current
// waveforms when their trigger pads rise (starting on the next sample
// tick), drive the H-bridge switches, IDAC codes and charge-pump enables,
// balance charge afterwards, and signal the start of each pulse to the
// canceller, whose per-stimulator LMS banks learn the artifact of that
// stimulator, tap by tap.
//
// Configuration comes from scan_config; its record is bbci_pkg::cfg_t.
// The analog parts (electrode multiplexer, CDAC, amplifier, ADC, charge
// pumps, resonant oscillators, high-voltage adapters, IDACs, comparators)
// are outside this module; their digital signals are its ports.
//
// Timing of one recording slot (all on clk, the core clock):
//   tick      mux_sel moves to the next channel; adc_code, which must
//             hold the conversion of the channel selected until now, is
//             registered
//   tick+1    LMS write-back and delta update for that channel; reads for
//             the new channel; the finished sample is handed to the
//             serializer
//   tick+3    cdac_code valid for the new channel; it holds until the
//             next tick+3, so the front-end must sample after it
// The sample period (cfg.tick_div) must be at least 2*34 cycles for the
// serializer to keep up. tick_div = 0 stops recording.
module bbci_top
  import bbci_pkg::*;
(
  input  logic                              clk,
  input  logic                              rst_n,
  // scan configuration
  input  logic                              scan_en,
  input  logic                              scan_in,
  input  logic                              scan_update,
  output logic                              scan_out,
  input  logic                              cancel_clr,
  // recording front-end
  output logic [CH_W-1:0]                   mux_sel,
  output logic signed [CODE_W-1:0]          cdac_code,
  output logic                              adc_sample,
  input  logic signed [ADC_W-1:0]           adc_code,
  // stimulators
  input  logic [NUM_STIM-1:0]               stim_trig,
  input  logic [NUM_STIM-1:0]               supply_cmp,
  input  logic [NUM_STIM-1:0]               track_cmp,
  output logic [NUM_STIM-1:0][IDAC_W-1:0]   idac_code,
  output logic [NUM_STIM-1:0]               pump_en_p,
  output logic [NUM_STIM-1:0]               pump_en_n,
  output logic [NUM_STIM-1:0]               lsw_p,
  output logic [NUM_STIM-1:0]               lsw_n,
  output logic [NUM_STIM-1:0]               dis_res_en,
  output logic [NUM_STIM-1:0]               track_mode,
  output logic [NUM_STIM-1:0]               stim_busy,
  output logic [NUM_STIM-1:0]               cancel_busy,
  // serial output
  output logic                              ser_clk,
  output logic                              ser_data,
  output logic                              ser_sync,
  output logic                              ser_busy,
  output logic [7:0]                        ser_drop_cnt
);

  cfg_t cfg;

  scan_config #(.WIDTH(CFG_W)) u_scan (
    .clk, .rst_n, .scan_en, .scan_in, .scan_update, .scan_out,
    .cfg (cfg)
  );

  // ---------------------------------------------------------------- timing
  logic            tick, frame_tick, upd;
  logic [CH_W-1:0] ch, prev_ch;
  logic signed [ADC_W-1:0] adc_q;

  channel_sequencer #(.NUM_CH(NUM_CH), .DIV_W(TIME_W)) u_seq (
    .clk, .rst_n,
    .enable     (cfg.tick_div != '0),
    .tick_div   (cfg.tick_div),
    .active_ch  (cfg.active_ch),
    .tick, .ch, .prev_ch, .frame_tick
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upd   <= 1'b0;
      adc_q <= '0;
    end else begin
      upd <= tick;
      if (tick) adc_q <= adc_code;
    end
  end

  assign mux_sel    = ch;
  assign adc_sample = tick;

  // --------------------------------------------------------- recording loop
  logic signed [CODE_W-1:0] dac_out, art_out;
  logic adc_valid, cancel_live, delta_upd;
  assign adc_valid = upd;
  // While the canceller works on a channel its delta code is held, so the
  // ADC output is the artifact residual the LMS loop needs (see README).
  // cancel_live still refers to the channel whose sample arrives at upd.
  assign delta_upd = upd && !cancel_live;

  delta_encoder #(.NUM_CH(NUM_CH), .CODE_W(CODE_W), .ADC_W(ADC_W)) u_delta (
    .clk, .rst_n,
    .en        (cfg.delta_en),
    .shift     (cfg.delta_shift),
    .upd, .ch, .prev_ch,
    .adc_valid (delta_upd),
    .adc       (adc_q),
    .dac_out   (dac_out)
  );

  logic [NUM_STIM-1:0][SLOTS-1:0]           slot_en;
  logic [NUM_STIM-1:0][SLOTS-1:0][CH_W-1:0] slot_ch;
  logic [NUM_STIM-1:0][3:0]                 mu_shift;
  logic [NUM_STIM-1:0]                      adapt_en;
  logic [NUM_STIM-1:0]                      stim_start;

  always_comb begin
    for (int s = 0; s < NUM_STIM; s++) begin
      slot_en[s]  = cfg.bank[s].slot_en;
      slot_ch[s]  = cfg.bank[s].slot_ch;
      mu_shift[s] = cfg.bank[s].mu_shift;
      adapt_en[s] = cfg.bank[s].adapt_en;
    end
  end

  artifact_canceller #(
    .NUM_CH(NUM_CH), .NUM_STIM(NUM_STIM), .NUM_TAPS(NUM_TAPS),
    .SLOTS(SLOTS), .CODE_W(CODE_W), .ADC_W(ADC_W)
  ) u_cancel (
    .clk, .rst_n,
    .clr        (cancel_clr),
    .cancel_en  (cfg.cancel_en),
    .slot_en, .slot_ch, .mu_shift, .adapt_en,
    .trig       (stim_start),
    .frame_tick, .upd, .adc_valid, .ch,
    .adc        (adc_q),
    .dac_in     (dac_out),
    .art_out    (art_out),
    .cdac_code  (cdac_code),
    .busy       (cancel_busy),
    .live       (cancel_live)
  );

  serializer #(.CH_W(CH_W), .ADC_W(ADC_W), .CODE_W(CODE_W)) u_ser (
    .clk, .rst_n,
    .load     (adc_valid),
    .ch       (prev_ch),
    .adc      (adc_q),
    .dac      (dac_out),
    .art      (art_out),
    .ser_clk, .ser_data, .ser_sync,
    .busy     (ser_busy),
    .drop_cnt (ser_drop_cnt)
  );

  // ------------------------------------------------------------ stimulators
  for (genvar s = 0; s < NUM_STIM; s++) begin : g_stim
    stim_controller #(
      .WAVE_LEN(WAVE_LEN), .WAVE_W(WAVE_W), .IDAC_W(IDAC_W), .TIME_W(TIME_W)
    ) u_stim (
      .clk, .rst_n,
      .wave       (cfg.stim[s].wave),
      .step_len   (cfg.stim[s].step_len),
      .dis_active (cfg.stim[s].dis_active),
      .dis_code   (cfg.stim[s].dis_code),
      .dis_len    (cfg.stim[s].dis_len),
      .trig_pad   (stim_trig[s]),
      .slot_start (tick),
      .supply_cmp (supply_cmp[s]),
      .track_cmp  (track_cmp[s]),
      .idac_code  (idac_code[s]),
      .pump_en_p  (pump_en_p[s]),
      .pump_en_n  (pump_en_n[s]),
      .lsw_p      (lsw_p[s]),
      .lsw_n      (lsw_n[s]),
      .dis_res_en (dis_res_en[s]),
      .track_mode (track_mode[s]),
      .trig_out   (stim_start[s]),
      .busy       (stim_busy[s])
    );
  end

endmodule
