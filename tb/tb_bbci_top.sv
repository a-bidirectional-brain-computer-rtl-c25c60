// tb_bbci_top: end-to-end test of the digital core at its full size
// (64 channels, 4 stimulators, 32 taps, 16 artifact slots).
//
// A tissue/electrode model turns the four stimulators' bridge and IDAC
// outputs into currents; each current charges an electrode capacitance
// that leaks away, and the voltage it causes couples into a few recording
// channels. Each recording channel also carries a DC offset and a slow
// sine (the neural signal). The recording front-end model subtracts the
// CDAC code and clips to the 8-bit ADC range.
//
// The test loads the whole configuration through the scan chain (and
// reads it back), records with artifact cancellation off, then on, with
// the four stimulators firing periodically (stimulators 0 and 1 on shared
// channels with a varying overlap), then switches to the 8-channel
// 16 kS/s scan, then clears the learned codes. It checks:
//  - every serial frame: channel order, ADC code, and that
//    (DAC + ART) * 16 + ADC rebuilds the electrode voltage exactly
//    whenever the ADC did not clip;
//  - the sample rate: 64 * tick_div cycles per frame, 8 * tick_div in
//    the 16 kS/s mode;
//  - that the artifact left in the recorded signal (DAC * 16 + ADC minus
//    the neural signal) falls from clipping to within three CDAC steps
//    after learning, and that the ADC clips again after clearing;
//  - that each mechanism happened: scan read-back, each stimulator's
//    pulses, supply-gated pumping, comparator-ended active discharge,
//    passive discharge, each bank's triggered learning, overlapping
//    artifacts, ADC clipping, both scan modes, learned-code clearing.
module tb_bbci_top;
  import bbci_pkg::*;

  localparam int TICK_DIV = 80;
  localparam int PERIOD_FRAMES = 40;
  localparam int LEARN_PERIODS = 80;

  logic clk = 0, rst_n = 0;
  logic scan_en = 0, scan_in = 0, scan_update = 0, scan_out, cancel_clr = 0;
  logic [CH_W-1:0] mux_sel;
  logic signed [CODE_W-1:0] cdac_code;
  logic adc_sample;
  logic signed [ADC_W-1:0] adc_code;
  logic [NUM_STIM-1:0] stim_trig = 0, supply_cmp = 0, track_cmp;
  logic [NUM_STIM-1:0][IDAC_W-1:0] idac_code;
  logic [NUM_STIM-1:0] pump_en_p, pump_en_n, lsw_p, lsw_n, dis_res_en, track_mode;
  logic [NUM_STIM-1:0] stim_busy, cancel_busy;
  logic ser_clk, ser_data, ser_sync, ser_busy;
  logic [7:0] ser_drop_cnt;
  logic adc_clip;
  int electrode [NUM_CH];

  bbci_top dut (.*);

  rec_afe_model #(.NUM_CH(NUM_CH)) afe (
    .mux_sel, .cdac_code, .electrode, .adc_code, .clipped(adc_clip));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------- tissue model
  real q [NUM_STIM];                 // charge on each electrode pair
  real gain [NUM_STIM][NUM_CH];      // coupling into recording channels
  int  offset [NUM_CH];
  int  neural [NUM_CH];              // electrode voltage without artifacts
  longint cyc = 0;
  initial for (int s = 0; s < NUM_STIM; s++) q[s] = 0.0;

  function automatic real current(int s);
    if (lsw_n[s]) return  real'(idac_code[s]);
    if (lsw_p[s]) return -real'(idac_code[s]);
    return 0.0;
  endfunction

  always @(negedge clk) begin
    real v;
    int c;
    cyc++;
    for (int s = 0; s < NUM_STIM; s++) begin
      q[s] = q[s] * (dis_res_en[s] ? 0.999 : 0.99993) + 0.01 * current(s);
      track_cmp[s] = (q[s] > 0.0);
      supply_cmp[s] = 1'($urandom);
    end
    c = int'(mux_sel);
    v = real'(offset[c]) + 40.0 * $sin(6.2832 * real'(cyc) / (400.0 * 64 * TICK_DIV) + c);
    neural[c] = int'(v);
    for (int s = 0; s < NUM_STIM; s++) v += gain[s][c] * (8.0 * current(s) + q[s]);
    electrode[c] = int'(v);
  end

  // --------------------------------------------- sampling reference queue
  typedef struct { int ch; int adc; int ev; int nv; bit clip; } smp_t;
  smp_t smp_q [$];
  bit art_window = 0;     // some bank is learning
  int max_res = 0, max_ch = 0;
  int max_err = 0;   // largest artifact left in the recorded signal
  int max_art = 0;   // largest artifact at the electrode
  int n_clip = 0, n_ticks = 0;
  always @(posedge clk) if (rst_n && adc_sample) begin
    smp_q.push_back('{int'(mux_sel), int'(adc_code), electrode[mux_sel], neural[mux_sel], adc_clip});
    n_ticks++;
    if (adc_clip) n_clip++;
    if (cancel_busy != 0) begin
      if (int'(adc_code) > max_res || -int'(adc_code) > max_res) begin
        max_res = (adc_code < 0) ? -int'(adc_code) : int'(adc_code);
        max_ch = int'(mux_sel);
      end
    end
  end

  // ------------------------------------------------------ serial receiver
  localparam int FW = CH_W + ADC_W + 2 * CODE_W;
  logic [FW-1:0] rx;
  int nbits = 0, n_frames_rx = 0, n_rebuilt = 0;
  logic ser_clk_d = 0;
  always @(posedge clk) begin
    ser_clk_d <= ser_clk;
    if (ser_clk && !ser_clk_d) begin
      if (ser_sync) nbits = 0;
      rx = {rx[FW-2:0], ser_data};
      nbits++;
      if (nbits == FW) begin
        smp_t e;
        int fch, fadc, fdac, fart;
        fch  = int'(rx[FW-1 -: CH_W]);
        fadc = int'($signed(rx[2*CODE_W +: ADC_W]));
        fdac = int'($signed(rx[CODE_W +: CODE_W]));
        fart = int'($signed(rx[0 +: CODE_W]));
        n_frames_rx++;
        if (smp_q.size() == 0) check(0, "frame without sample");
        else begin
          e = smp_q.pop_front();
          check(fch == e.ch && fadc == e.adc, "frame channel and ADC code");
          if (!e.clip) begin
            check((fdac + fart) * 16 + fadc == e.ev, "sample rebuilt from DAC, ART and ADC");
            n_rebuilt++;
          end
          // recorded signal after cancellation: DAC * 16 + ADC
          if (e.ev != e.nv) begin
            int d, a;
            d = fdac * 16 + fadc - e.nv;
            a = e.ev - e.nv;
            if (d < 0) d = -d;
            if (a < 0) a = -a;
            if (d > max_err) max_err = d;
            if (a > max_art) max_art = a;
          end
        end
      end
    end
  end

  // --------------------------------------------------- mechanism counters
  int n_pulse [NUM_STIM];
  int n_learn [NUM_STIM];
  int n_pump = 0, n_active_dis = 0, n_passive_dis = 0, n_overlap = 0;
  logic [NUM_STIM-1:0] busy_d = 0, cbusy_d = 0, tmode_d = 0;
  initial for (int s = 0; s < NUM_STIM; s++) begin n_pulse[s] = 0; n_learn[s] = 0; end
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < NUM_STIM; s++) begin
      if (stim_busy[s] && !busy_d[s]) n_pulse[s]++;
      if (cancel_busy[s] && !cbusy_d[s]) n_learn[s]++;
      if (track_mode[s] && !tmode_d[s]) begin
        if (dis_res_en[s]) n_passive_dis++; else n_active_dis++;
      end
      if (pump_en_p[s] || pump_en_n[s]) n_pump++;
    end
    if (cancel_busy[0] && cancel_busy[1]) n_overlap++;
    busy_d <= stim_busy; cbusy_d <= cancel_busy; tmode_d <= track_mode;
  end

  // active discharge must end by the comparator, before its time limit
  int dis_cycles [NUM_STIM];
  always @(posedge clk) for (int s = 0; s < NUM_STIM; s++) begin
    if (track_mode[s] && !dis_res_en[s]) dis_cycles[s]++;
    else begin
      if (dis_cycles[s] != 0) check(dis_cycles[s] < 4000, "active discharge ended by comparator");
      dis_cycles[s] = 0;
    end
  end

  // ---------------------------------------------------------- stimulus
  cfg_t cfg;

  task automatic scan_load(input cfg_t c, output logic [CFG_W-1:0] old);
    logic [CFG_W-1:0] bits;
    bits = c;
    old = '0;
    for (int b = CFG_W - 1; b >= 0; b--) begin
      @(negedge clk);
      scan_en = 1; scan_in = bits[b];
      old = {old[CFG_W-2:0], scan_out};
    end
    @(negedge clk); scan_en = 0;
    scan_update = 1; @(negedge clk); scan_update = 0;
  endtask

  // wait until channel ch is about to be converted in a new frame
  task automatic wait_frame_start();
    @(posedge clk iff (adc_sample && mux_sel == CH_W'(cfg.active_ch - 1)));
    @(negedge clk);
  endtask

  task automatic fire(input logic [NUM_STIM-1:0] which);
    repeat (10 * TICK_DIV) @(negedge clk);     // fixed position in the frame
    stim_trig = which;
    repeat (4) @(negedge clk);
    stim_trig = 0;
  endtask

  // one stimulation period; stimulator 1 fires off frames after 0
  task automatic period(input int off);
    for (int f = 0; f < PERIOD_FRAMES; f++) begin
      logic [NUM_STIM-1:0] w;
      wait_frame_start();
      w = {(f == 25), (f == 20), (f == off), (f == 0)};
      if (w != 0) fire(w);
    end
  endtask

  function automatic cfg_t make_cfg(input bit cancel, input int nch);
    cfg_t c;
    c = '0;
    c.tick_div    = TIME_W'(TICK_DIV);
    c.active_ch   = (CH_W+1)'(nch);
    c.delta_en    = 1;
    c.delta_shift = 4;
    c.cancel_en   = cancel;
    for (int s = 0; s < NUM_STIM; s++) begin
      c.bank[s].slot_en  = '1;
      c.bank[s].mu_shift = 5;
      c.bank[s].adapt_en = 1;
      for (int k = 0; k < SLOTS; k++)
        c.bank[s].slot_ch[k] = CH_W'((s == 0) ? k : (s == 1) ? 2 + k : (s == 2) ? 20 + k : 40 + k);
      c.stim[s].step_len   = TIME_W'(4 * TICK_DIV);
      c.stim[s].dis_active = (s < 2);
      c.stim[s].dis_code   = 8'd40;
      c.stim[s].dis_len    = TIME_W'(3000);
      for (int k = 0; k < WAVE_LEN; k++) begin
        int a;
        case (s)
          0: a = (k < 8) ? 10 + 10 * k : -(10 + 10 * (k - 8));             // rising exponential-like
          1: a = (k < 8) ? int'(100 * $sin(3.1416 * (k + 0.5) / 8)) : -int'(100 * $sin(3.1416 * (k - 7.5) / 8));
          2: a = (k < 7) ? 80 : (k == 7) ? 0 : (k < 15) ? -80 : 0;          // square, gap
          default: a = (k < 8) ? 90 - 10 * k : -(90 - 10 * (k - 8));        // decaying
        endcase
        c.stim[s].wave[k] = WAVE_W'(a);
      end
    end
    return c;
  endfunction

  int first_res, learned_res, cleared_res;
  longint t0;
  int fr_cycles;
  initial begin
    logic [CFG_W-1:0] old;
    for (int c = 0; c < NUM_CH; c++) begin
      offset[c] = int'($urandom % 4000) - 2000;
      electrode[c] = offset[c];
      for (int s = 0; s < NUM_STIM; s++) gain[s][c] = 0.0;
    end
    for (int k = 0; k < 4; k++) begin
      gain[0][k]      = 0.25 + 0.1 * k;
      gain[1][2 + k]  = 0.3;
      gain[2][20 + k] = 0.2 + 0.1 * k;
      gain[3][40 + k] = 0.4;
    end
    track_cmp = 0;
    repeat (5) @(negedge clk);
    rst_n = 1;

    // configuration, then read it back by loading a second record
    cfg = make_cfg(0, NUM_CH);
    scan_load(cfg, old);
    check(old == '0, "scan chain empty after reset");
    scan_load(cfg, old);
    check(old == CFG_W'(cfg), "scan read-back returns the loaded record");

    // frame rate at 64 channels
    wait_frame_start(); t0 = cyc;
    wait_frame_start(); fr_cycles = int'(cyc - t0);
    check(fr_cycles == NUM_CH * TICK_DIV, "64-channel frame period");

    // stimulation without cancellation
    max_res = 0;
    period(3);
    check(max_res >= 127, "artifact clips the ADC without cancellation");

    // learning
    cfg.cancel_en = 1;
    scan_load(cfg, old);
    for (int p = 0; p < LEARN_PERIODS; p++) begin
      max_err = 0; max_art = 0;
      period(3);
      if (p == 0) first_res = max_err;
      if (p % 10 == 0) $display("period %0d: largest artifact left %0d ADC LSB", p, max_err);
    end
    max_err = 0; max_art = 0;
    period(3);
    learned_res = max_err;
    $display("artifact: %0d ADC LSB at the electrode, %0d left at first, %0d left after learning (%0.1f dB)",
             max_art, first_res, learned_res, 20.0 * $log10(real'(max_art) / real'(learned_res)));
    check(max_art >= 300, "artifact spans many CDAC steps");
    check(first_res >= 127, "recording clips before the canceller has learned");
    check(learned_res <= 48, "artifact cancelled to within three CDAC steps");

    // 16 kS/s mode: 8 channels
    cfg.active_ch = 8;
    scan_load(cfg, old);
    wait_frame_start(); t0 = cyc;
    wait_frame_start(); fr_cycles = int'(cyc - t0);
    check(fr_cycles == 8 * TICK_DIV, "8-channel frame period (16 kS/s)");
    for (int f = 0; f < 60; f++) begin
      wait_frame_start();
      if (f == 2) fire(4'b0011);
    end

    // clear the learned codes: the artifact is back
    cfg.active_ch = NUM_CH;
    scan_load(cfg, old);
    @(negedge clk); cancel_clr = 1; @(negedge clk); cancel_clr = 0;
    max_res = 0;
    period(5);
    cleared_res = max_res;
    check(cleared_res >= 127, "cleared codes no longer cancel");

    repeat (200) @(negedge clk);
    $display("pulses %0d %0d %0d %0d, learning runs %0d %0d %0d %0d",
             n_pulse[0], n_pulse[1], n_pulse[2], n_pulse[3], n_learn[0], n_learn[1], n_learn[2], n_learn[3]);
    $display("pump cycles %0d, active discharges %0d, passive %0d, overlap cycles %0d, clipped %0d of %0d, frames %0d rebuilt %0d",
             n_pump, n_active_dis, n_passive_dis, n_overlap, n_clip, n_ticks, n_frames_rx, n_rebuilt);
    for (int s = 0; s < NUM_STIM; s++) begin
      check(n_pulse[s] > 0, "stimulator pulsed");
      check(n_learn[s] > 0, "bank learning triggered");
    end
    check(n_pump > 0, "supply-gated pumping");
    check(n_active_dis > 0, "active discharge");
    check(n_passive_dis > 0, "passive discharge");
    check(n_overlap > 0, "overlapping artifacts");
    check(n_clip > 0, "ADC clipping");
    check(n_rebuilt > 1000, "samples rebuilt from serial frames");
    check(ser_drop_cnt == 0, "serializer kept up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
