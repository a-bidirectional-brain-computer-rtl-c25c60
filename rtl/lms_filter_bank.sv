// lms_filter_bank: LMS artifact-learning loop of one stimulator.
//
// The bank learns, for each recording channel assigned to it, the CDAC
// code sequence x[n] that cancels the artifact its stimulator produces on
// that channel, one code per tap n (one tap per recording frame after the
// stimulation trigger). The update is the sign-preserving LMS step
//
//   x[n] <= x[n] + (e >>> mu_shift)
//
// where e is the ADC output of that channel, i.e. the residual left after
// the summed canceller output has been subtracted at the input, and the
// step size mu = 2^-mu_shift is a bit shift. The bank only ever works on
// the channel the multiplexer currently selects, so one adder and one
// shifter serve any number of channels (the loop rotates between them).
// Codes live in a canceller_sram of SLOTS x NUM_TAPS words: the bank can
// hold artifacts for SLOTS recording channels, chosen by slot_ch/slot_en.
// A triggered_counter gives the tap index.
//
// Data flow and timing (upd is the cycle after a channel tick; in it ch
// is the newly selected channel and adc belongs to the previous one):
//   upd: read   x[slot(ch)][tap]   -> art_out from the next cycle
//        write  x_old + (adc >>> mu) to the word read at the previous upd
// The read word and its address are held for one sample (the two z^-1
// registers of the loop) so the write-back hits the word that produced
// the residual. art_out is 0 while the counter is idle or the channel has
// no slot; live is high while art_out carries a stored word. Codes
// saturate at the CODE_W-bit signed range.
// The loop structure, the bit-shift step and the per-stimulator bank
// follow the chip description; slot mapping, saturation and the clearing
// input (clr) are this design's choices.
module lms_filter_bank #(
  parameter int unsigned NUM_CH   = 64,
  parameter int unsigned NUM_TAPS = 32,
  parameter int unsigned SLOTS    = 4,
  parameter int unsigned CODE_W   = 10,
  parameter int unsigned ADC_W    = 8,
  localparam int unsigned CH_W    = $clog2(NUM_CH),
  localparam int unsigned TAP_W   = $clog2(NUM_TAPS),
  localparam int unsigned SLOT_W  = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int unsigned ADDR_W  = SLOT_W + TAP_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr,
  // configuration
  input  logic [SLOTS-1:0]           slot_en,
  input  logic [SLOTS-1:0][CH_W-1:0] slot_ch,
  input  logic [3:0]                 mu_shift,
  input  logic                       adapt_en,
  // stimulation trigger and recording timing
  input  logic                       trig,
  input  logic                       frame_tick,
  input  logic                       upd,
  input  logic                       adc_valid,
  input  logic [CH_W-1:0]            ch,
  input  logic signed [ADC_W-1:0]    adc,
  // canceller output for the selected channel
  output logic signed [CODE_W-1:0]   art_out,
  output logic                       busy,
  output logic                       live
);

  localparam int unsigned SUM_W = CODE_W + 2;

  logic [TAP_W-1:0]  tap;
  logic              active;
  logic              hit;
  logic [SLOT_W-1:0] hit_slot;
  logic [ADDR_W-1:0] raddr;
  logic [ADDR_W-1:0] addr_q;   // address of the word now in rdata
  logic              valid_q;  // rdata holds a live word
  logic [CODE_W-1:0] rdata;
  logic signed [ADC_W-1:0]  step;
  logic signed [SUM_W-1:0]  sum;
  logic signed [CODE_W-1:0] wdata;
  logic              we;

  triggered_counter #(.NUM_TAPS(NUM_TAPS)) u_cnt (
    .clk, .rst_n, .trig, .frame_tick, .tap, .active
  );

  // slot look-up: lowest enabled slot that maps the selected channel
  always_comb begin
    hit      = 1'b0;
    hit_slot = '0;
    for (int s = SLOTS - 1; s >= 0; s--) begin
      if (slot_en[s] && slot_ch[s] == ch) begin
        hit      = 1'b1;
        hit_slot = SLOT_W'(s);
      end
    end
    raddr = {hit_slot, tap};
  end

  // LMS update of the word read one sample ago
  always_comb begin
    step = adc >>> mu_shift;
    sum  = SUM_W'($signed(rdata)) + SUM_W'(step);
    if (sum > SUM_W'((1 <<< (CODE_W-1)) - 1))  wdata = {1'b0, {(CODE_W-1){1'b1}}};
    else if (sum < -SUM_W'(1 <<< (CODE_W-1)))  wdata = {1'b1, {(CODE_W-1){1'b0}}};
    else                                        wdata = sum[CODE_W-1:0];
    we = upd && adc_valid && adapt_en && valid_q;
  end

  canceller_sram #(.DEPTH(SLOTS * NUM_TAPS), .WIDTH(CODE_W)) u_sram (
    .clk, .rst_n, .clr,
    .re    (upd),
    .raddr (raddr),
    .rdata (rdata),
    .we    (we),
    .waddr (addr_q),
    .wdata (wdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q  <= '0;
      valid_q <= 1'b0;
    end else if (clr) begin
      valid_q <= 1'b0;
    end else if (upd) begin
      addr_q  <= raddr;
      valid_q <= hit && active;
    end
  end

  assign art_out = valid_q ? $signed(rdata) : '0;
  assign busy    = active;
  assign live    = valid_q;

endmodule
