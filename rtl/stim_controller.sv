// stim_controller: digital control of one resonant H-bridge stimulator.
//
// A stimulus is a pre-programmed current waveform of WAVE_LEN signed
// samples (the "arbitrary waveform registers"); each sample is held for
// step_len clock cycles. A sample's magnitude is the code of the shared
// current DAC (IDAC), its sign the direction of current through the
// electrode pair: positive drives the P electrode from its charge-pump
// supply and returns the current through the N side's high-voltage
// adapter and low-side switch into the IDAC; negative does the reverse.
// A zero sample opens the bridge (for gaps such as an interphase delay).
// A biphasic pulse of any shape (square, half-sine, exponential) is thus
// one table.
//
// While a side sources current its charge pump runs only when the
// supply-enable comparator (supply_cmp) reports too little voltage across
// the load, so the pump supplies no more than is needed.
//
// After the last sample the tracking comparator is switched to compare
// the two electrode voltages (track_mode) and residual charge is removed:
//  - active discharge (dis_active=1): the IDAC sinks dis_code from the
//    higher electrode until the comparator output flips (the residual
//    crossed zero) or dis_len cycles pass;
//  - passive discharge: the discharge resistor is switched in for
//    dis_len cycles.
//
// A stimulus starts on a rising edge of the trigger pad (synchronised by
// two flip-flops) when the controller is idle, at the next cycle in which
// slot_start is high. In the core slot_start is the recording sample
// tick, so every pulse begins at a sample-slot boundary and its artifact
// lines up with the recording samples the same way every time; the
// channel converted while the pulse begins is then already served by the
// canceller. trig_out is high in that slot_start cycle, one cycle before
// the current flows, and tells the artifact canceller that a pulse
// begins; it comes early enough for the canceller's read of the slot that
// starts with the same tick.
// Pad triggering, programmable waveforms, supply gating by a comparator
// and post-pulse charge balancing by active or passive discharge follow
// the chip description; table length, sample widths, the sign-magnitude
// reading of samples, the alignment to slot_start and the timers are this
// design's choices.
//
// Timing: the state is registered. With slot_start held high the first
// sample is applied three cycles after the pad edge (two synchroniser
// stages and the state register); otherwise at the clock edge that ends
// the first slot_start cycle after that. A pulse lasts WAVE_LEN*step_len
// cycles (step_len 0 acts as 1).
module stim_controller #(
  parameter int unsigned WAVE_LEN = 16,
  parameter int unsigned WAVE_W   = 8,
  parameter int unsigned IDAC_W   = 8,
  parameter int unsigned TIME_W   = 12,
  localparam int unsigned IDX_W   = $clog2(WAVE_LEN)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // configuration
  input  logic [WAVE_LEN-1:0][WAVE_W-1:0]  wave,
  input  logic [TIME_W-1:0]                step_len,
  input  logic                             dis_active,
  input  logic [IDAC_W-1:0]                dis_code,
  input  logic [TIME_W-1:0]                dis_len,
  // pad trigger and analog comparators
  input  logic                             trig_pad,
  input  logic                             slot_start,
  input  logic                             supply_cmp,
  input  logic                             track_cmp,
  // bridge, supply and IDAC control
  output logic [IDAC_W-1:0]                idac_code,
  output logic                             pump_en_p,
  output logic                             pump_en_n,
  output logic                             lsw_p,
  output logic                             lsw_n,
  output logic                             dis_res_en,
  output logic                             track_mode,
  // to the artifact canceller
  output logic                             trig_out,
  output logic                             busy
);

  typedef enum logic [1:0] {S_IDLE, S_STIM, S_DISCHARGE} state_t;

  state_t             state_q;
  logic [2:0]         sync_q;
  logic               start;
  logic               pend_q;   // pad edge seen, waiting for a slot start
  logic [IDX_W-1:0]   idx_q;
  logic [TIME_W-1:0]  tmr_q;
  logic [TIME_W-1:0]  step_lim;
  logic               cmp0_q;   // comparator level when discharge began
  logic signed [WAVE_W-1:0] smp;
  logic [WAVE_W-1:0]  mag;

  assign start    = sync_q[1] && !sync_q[2];
  // combinational, so the canceller restarts in the slot_start cycle
  assign trig_out = (state_q == S_IDLE) && (start || pend_q) && slot_start;
  assign step_lim = (step_len == '0) ? '0 : step_len - TIME_W'(1);
  assign smp      = $signed(wave[idx_q]);
  assign mag      = smp[WAVE_W-1] ? WAVE_W'(-smp) : WAVE_W'(smp);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q   <= '0;
      pend_q   <= 1'b0;
      state_q  <= S_IDLE;
      idx_q    <= '0;
      tmr_q    <= '0;
      cmp0_q   <= 1'b0;
    end else begin
      sync_q   <= {sync_q[1:0], trig_pad};
      unique case (state_q)
        S_IDLE: if (trig_out) begin
          state_q  <= S_STIM;
          pend_q   <= 1'b0;
          idx_q    <= '0;
          tmr_q    <= '0;
        end else if (start) begin
          pend_q   <= 1'b1;
        end
        S_STIM: begin
          if (tmr_q >= step_lim) begin
            tmr_q <= '0;
            if (idx_q == IDX_W'(WAVE_LEN - 1)) begin
              state_q <= S_DISCHARGE;
              cmp0_q  <= track_cmp;
            end else begin
              idx_q <= idx_q + IDX_W'(1);
            end
          end else begin
            tmr_q <= tmr_q + TIME_W'(1);
          end
        end
        S_DISCHARGE: begin
          if (tmr_q >= dis_len || (dis_active && track_cmp != cmp0_q)) begin
            state_q <= S_IDLE;
            tmr_q   <= '0;
          end else begin
            tmr_q <= tmr_q + TIME_W'(1);
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Bridge, pump and IDAC control decoded from the state.
  always_comb begin
    idac_code  = '0;
    pump_en_p  = 1'b0;
    pump_en_n  = 1'b0;
    lsw_p      = 1'b0;
    lsw_n      = 1'b0;
    dis_res_en = 1'b0;
    track_mode = 1'b0;
    unique case (state_q)
      S_STIM: if (mag != '0) begin
        idac_code = IDAC_W'(mag);
        if (!smp[WAVE_W-1]) begin   // P sources, N returns
          pump_en_p = supply_cmp;
          lsw_n     = 1'b1;
        end else begin              // N sources, P returns
          pump_en_n = supply_cmp;
          lsw_p     = 1'b1;
        end
      end
      S_DISCHARGE: begin
        track_mode = 1'b1;
        if (dis_active) begin
          idac_code = dis_code;
          lsw_p     = cmp0_q;       // sink from the higher electrode
          lsw_n     = !cmp0_q;
        end else begin
          dis_res_en = 1'b1;
        end
      end
      default: ;
    endcase
  end

  assign busy = (state_q != S_IDLE);

  // A bridge never closes both low-side switches or runs both pumps.
  assert property (@(posedge clk) !(lsw_p && lsw_n))
    else $error("stim_controller: both low-side switches closed");
  assert property (@(posedge clk) !(pump_en_p && pump_en_n))
    else $error("stim_controller: both charge pumps enabled");

endmodule
