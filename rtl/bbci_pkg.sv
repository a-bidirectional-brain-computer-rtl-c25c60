// bbci_pkg: widths, sizes and the configuration record shared by the
// digital core of the bidirectional neural interface.
//
// The recording chain time-multiplexes 64 electrodes through one CDAC
// (10 bits), amplifier and SAR ADC (8 bits). Four stimulators each own one
// LMS filter bank; the 5120-bit canceller memory holds 16 artifacts of
// 32 taps x 10 bits, i.e. four recording-channel slots per stimulator.
// These counts follow the chip description. The configuration record
// (cfg_t) is this design's own layout: it is what the scan chain loads.
package bbci_pkg;

  localparam int unsigned NUM_CH       = 64;  // recording channels (MUX 64-1)
  localparam int unsigned CH_W         = $clog2(NUM_CH);
  localparam int unsigned NUM_STIM     = 4;   // stimulators / filter banks
  localparam int unsigned NUM_TAPS     = 32;  // taps per stored artifact
  localparam int unsigned NUM_ART      = 16;  // stored artifacts in total
  localparam int unsigned SLOTS        = NUM_ART / NUM_STIM; // per bank
  localparam int unsigned CODE_W       = 10;  // CDAC / canceller code width
  localparam int unsigned ADC_W        = 8;   // SAR ADC output width
  localparam int unsigned WAVE_LEN     = 16;  // samples in a stimulus waveform
  localparam int unsigned WAVE_W       = 8;   // signed waveform sample width
  localparam int unsigned IDAC_W       = 8;   // IDAC magnitude code width
  localparam int unsigned TIME_W       = 12;  // timer widths (clock cycles)

  // Settings of one stimulator.
  typedef struct packed {
    logic [WAVE_LEN-1:0][WAVE_W-1:0] wave;     // signed samples, sign = bridge direction
    logic [TIME_W-1:0]               step_len; // clock cycles per waveform sample
    logic                            dis_active; // 1: active discharge, 0: resistor
    logic [IDAC_W-1:0]               dis_code; // IDAC code during active discharge
    logic [TIME_W-1:0]               dis_len;  // longest discharge time (cycles)
  } stim_cfg_t;

  // Settings of one LMS filter bank.
  typedef struct packed {
    logic [SLOTS-1:0]           slot_en;   // slot holds a learned artifact
    logic [SLOTS-1:0][CH_W-1:0] slot_ch;   // recording channel of each slot
    logic [3:0]                 mu_shift;  // update step mu = 2^-mu_shift
    logic                       adapt_en;  // let the bank update its codes
  } bank_cfg_t;

  // Complete configuration loaded through the scan chain.
  typedef struct packed {
    logic [TIME_W-1:0]          tick_div;     // clock cycles per channel sample
    logic [CH_W:0]              active_ch;    // channels in the scan (1..64)
    logic                       delta_en;     // delta encoding of the input
    logic [3:0]                 delta_shift;  // ADC-to-CDAC scaling shift
    logic                       cancel_en;    // apply the canceller output
    bank_cfg_t [NUM_STIM-1:0]   bank;
    stim_cfg_t [NUM_STIM-1:0]   stim;
  } cfg_t;

  localparam int unsigned CFG_W = $bits(cfg_t);

endpackage
