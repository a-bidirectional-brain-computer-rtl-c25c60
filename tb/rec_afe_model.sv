// rec_afe_model: behavioural model of the multiplexed recording front-end
// (electrode multiplexer, CDAC subtraction, amplifier and 8-bit SAR ADC)
// for testbenches. Not synthesizable circuitry: it only reproduces the
// transfer function seen by the digital core.
//
// The electrode voltages are given as integers in ADC LSBs (input
// referred). The selected electrode minus the CDAC code times LSB_RATIO
// (ADC LSBs per CDAC LSB) is the ADC output, clipped to the signed
// ADC_W-bit range. The result is combinational; the core registers it
// at the end of the sample slot.
module rec_afe_model #(
  parameter int unsigned NUM_CH    = 64,
  parameter int unsigned CODE_W    = 10,
  parameter int unsigned ADC_W     = 8,
  parameter int          LSB_RATIO = 16
) (
  input  logic [$clog2(NUM_CH)-1:0]  mux_sel,
  input  logic signed [CODE_W-1:0]   cdac_code,
  input  int                         electrode [NUM_CH],
  output logic signed [ADC_W-1:0]    adc_code,
  output logic                       clipped
);
  localparam int AMAX = (1 << (ADC_W - 1)) - 1;
  localparam int AMIN = -(1 << (ADC_W - 1));
  int v;
  always_comb begin
    v = electrode[mux_sel] - int'(cdac_code) * LSB_RATIO;
    clipped = (v > AMAX) || (v < AMIN);
    if (v > AMAX) v = AMAX;
    if (v < AMIN) v = AMIN;
    adc_code = ADC_W'(v);
  end
endmodule
