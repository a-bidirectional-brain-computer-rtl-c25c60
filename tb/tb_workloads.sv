// tb_workloads: the two bench cancellation experiments of the chip, run on
// the full-size core with the real clock ratio (13.56 MHz core clock,
// tick_div = 106, i.e. 128 kS/s in total).
//
//  A  64 channels at 2 kS/s; one stimulator with 400 us biphasic pulses
//     every 20 ms produces an artifact of about 250 CDAC steps (about 4000
//     ADC LSB, far beyond the ADC's +-128) on four channels.
//  B  8 channels at 16 kS/s; 400 us biphasic pulses at 77 pulses/s
//     (a 13 ms period), artifacts of the same size.
//  C  all four stimulators triggered together, playing a rising
//     exponential, a half-sine, a square and a decaying exponential
//     (positive lobe, then the mirrored negative one, 127 = full scale);
//     every sample of every stimulator is checked in the middle of its
//     step.
//
// A and B use the same tissue and front-end models as tb_bbci_top, learn
// for a number of pulses, and then measure the artifact left in the
// recorded signal (DAC * 16 + ADC minus the neural signal). Each must end
// below two CDAC steps (32 ADC LSB, 0.2 % of the CDAC range) while
// the artifact itself is thousands of ADC LSB. The pulse period and the
// 32-tap window are also checked against the sample rate: at 2 kS/s the
// taps span 16 ms, at 16 kS/s 2 ms.
module tb_workloads;
  import bbci_pkg::*;

  localparam int TICK_DIV = 106;                 // 13.56 MHz / 106 = 127.9 kHz
  localparam real F_CLK   = 13.56e6;

  logic clk = 0, rst_n = 0;
  logic scan_en = 0, scan_in = 0, scan_update = 0, scan_out, cancel_clr = 0;
  logic [CH_W-1:0] mux_sel;
  logic signed [CODE_W-1:0] cdac_code;
  logic adc_sample;
  logic signed [ADC_W-1:0] adc_code;
  logic [NUM_STIM-1:0] stim_trig = 0, supply_cmp = 0, track_cmp = 0;
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

  always #37 clk = ~clk;   // 74 ns period, about 13.56 MHz

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------- tissue model
  real q [NUM_STIM];
  real gain [NUM_STIM][NUM_CH];
  int  offset [NUM_CH];
  int  neural [NUM_CH];
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
    // offset plus a 50 Hz tone
    v = real'(offset[c]) + 20.0 * $sin(6.2832 * 50.0 * real'(cyc) / F_CLK + c);
    neural[c] = int'(v);
    for (int s = 0; s < NUM_STIM; s++) v += gain[s][c] * (8.0 * current(s) + q[s]);
    electrode[c] = int'(v);
  end

  // --------------------------------------------- samples and serial frames
  typedef struct { int adc; int ev; int nv; } smp_t;
  smp_t smp_q [$];
  always @(posedge clk) if (rst_n && adc_sample)
    smp_q.push_back('{int'(adc_code), electrode[mux_sel], neural[mux_sel]});

  localparam int FW = CH_W + ADC_W + 2 * CODE_W;
  logic [FW-1:0] rx;
  int nbits = 0;
  int max_err = 0, max_art = 0;
  logic ser_clk_d = 0;
  always @(posedge clk) begin
    ser_clk_d <= ser_clk;
    if (ser_clk && !ser_clk_d) begin
      if (ser_sync) nbits = 0;
      rx = {rx[FW-2:0], ser_data};
      nbits++;
      if (nbits == FW && smp_q.size() != 0) begin
        smp_t e;
        int fadc, fdac, d, a;
        e = smp_q.pop_front();
        fadc = int'($signed(rx[2*CODE_W +: ADC_W]));
        fdac = int'($signed(rx[CODE_W +: CODE_W]));
        if (e.ev != e.nv) begin
          d = fdac * 16 + fadc - e.nv; if (d < 0) d = -d;
          a = e.ev - e.nv;             if (a < 0) a = -a;
          if (d > max_err) max_err = d;
          if (a > max_art) max_art = a;
        end
      end
    end
  end

  // ---------------------------------------------------------- stimulus
  cfg_t cfg;

  task automatic scan_load(input cfg_t c);
    logic [CFG_W-1:0] bits;
    bits = c;
    for (int b = CFG_W - 1; b >= 0; b--) begin
      @(negedge clk);
      scan_en = 1; scan_in = bits[b];
    end
    @(negedge clk); scan_en = 0;
    scan_update = 1; @(negedge clk); scan_update = 0;
  endtask

  task automatic wait_frame_start();
    @(posedge clk iff (adc_sample && mux_sel == CH_W'(cfg.active_ch - 1)));
    @(negedge clk);
  endtask

  // one period of nframes frames, pulse at slot 1 of the first frame
  task automatic period(input int nframes);
    for (int f = 0; f < nframes; f++) begin
      wait_frame_start();
      if (f == 0) begin
        repeat (TICK_DIV) @(negedge clk);
        stim_trig[0] = 1;
        repeat (4) @(negedge clk);
        stim_trig[0] = 0;
      end
    end
  endtask

  function automatic cfg_t make_cfg(input int nch, input int mu, input int step);
    cfg_t c;
    c = '0;
    c.tick_div    = TIME_W'(TICK_DIV);
    c.active_ch   = (CH_W+1)'(nch);
    c.delta_en    = 1;
    c.delta_shift = 4;
    c.cancel_en   = 1;
    c.bank[0].slot_en  = '1;
    c.bank[0].mu_shift = 4'(mu);
    c.bank[0].adapt_en = 1;
    for (int k = 0; k < SLOTS; k++) c.bank[0].slot_ch[k] = CH_W'(k);
    c.stim[0].step_len   = TIME_W'(step);
    c.stim[0].dis_active = 1;
    c.stim[0].dis_code   = 8'd60;
    c.stim[0].dis_len    = TIME_W'(4000);
    for (int k = 0; k < WAVE_LEN; k++)      // 400 us biphasic square
      c.stim[0].wave[k] = WAVE_W'((k < 8) ? 100 : -100);
    return c;
  endfunction

  task automatic workload(input string name, input int nch, input int nframes, input int npulses,
                          input real g0);
    int first_err, art;
    real period_s, tap_span_s;
    for (int k = 0; k < 4; k++) gain[0][k] = g0 + 0.1 * g0 * k;
    cfg = make_cfg(nch, 4, int'(400e-6 / 16.0 * F_CLK));
    scan_load(cfg);
    period_s   = real'(nframes * nch * TICK_DIV) / F_CLK;
    tap_span_s = real'(NUM_TAPS * nch * TICK_DIV) / F_CLK;
    $display("%s: %0d channels at %0.2f kS/s, pulse every %0.2f ms, taps span %0.2f ms",
             name, nch, F_CLK / real'(nch * TICK_DIV) / 1e3, period_s * 1e3, tap_span_s * 1e3);
    check(tap_span_s < period_s, "artifact window shorter than the pulse period");
    first_err = 0; art = 0;
    for (int p = 0; p < npulses; p++) begin
      max_err = 0; max_art = 0;
      period(nframes);
      if (p == 0) first_err = max_err;
      if (max_art > art) art = max_art;
    end
    $display("%s: artifact %0d ADC LSB (%0d CDAC steps); left after the first pulse %0d, after %0d pulses %0d (%0.1f dB)",
             name, art, art / 16, first_err, npulses, max_err, 20.0 * $log10(real'(art) / real'(max_err > 0 ? max_err : 1)));
    check(art >= 3500, "artifact of at least 200 CDAC steps");
    check(first_err >= 127, "recording saturated before learning");
    check(max_err <= 32, "artifact cancelled to within two CDAC steps");
  endtask

  // value of sample k of shape sh at full scale 127: the first eight
  // samples form the positive lobe, the last eight the mirrored negative one
  function automatic int shape(input int sh, input int k);
    real j, v;
    j = real'(k % 8);
    case (sh)
      0:       v = ($exp(2.0 * j / 7.0) - 1.0) / ($exp(2.0) - 1.0);  // rising exponential
      1:       v = $sin(3.14159265 * (j + 0.5) / 8.0);              // half-sine
      2:       v = 1.0;                                             // square
      default: v = $exp(-j / 3.0);                                  // decaying exponential
    endcase
    return (k < 8) ? int'(127.0 * v) : -int'(127.0 * v);
  endfunction

  // C: all four stimulators play four different shapes at once, each
  // sample checked in the middle of its step
  task automatic shapes(input int step);
    int both = 0, v;
    cfg = make_cfg(64, 4, step);
    for (int st = 0; st < NUM_STIM; st++) begin
      cfg.stim[st] = cfg.stim[0];
      for (int k = 0; k < WAVE_LEN; k++) cfg.stim[st].wave[k] = WAVE_W'(shape(st, k));
    end
    cfg.cancel_en = 0;
    scan_load(cfg);
    wait_frame_start();
    repeat (TICK_DIV / 2) @(negedge clk);
    stim_trig = '1;
    @(posedge clk iff stim_busy[0]);
    @(negedge clk);
    stim_trig = '0;
    for (int k = 0; k < WAVE_LEN; k++) begin
      repeat (step / 2) @(negedge clk);
      check(stim_busy == '1, "four stimulators busy together");
      for (int st = 0; st < NUM_STIM; st++) begin
        v = shape(st, k);
        check(int'(idac_code[st]) == ((v < 0) ? -v : v), "IDAC code follows the programmed shape");
        check(lsw_n[st] == (v > 0) && lsw_p[st] == (v < 0), "bridge direction follows the sign");
        if (stim_busy[st] && idac_code[st] != 0) both++;
      end
      repeat (step - step / 2) @(negedge clk);
    end
    $display("C (four shapes at once): %0d of %0d sample checks with all four driving", both, 4 * WAVE_LEN);
    check(both >= 4 * WAVE_LEN - 4, "all four stimulators drive concurrently");
    @(negedge clk iff stim_busy == '0);
  endtask

  initial begin
    for (int c = 0; c < NUM_CH; c++) begin
      offset[c] = int'($urandom % 2000) - 1000;
      electrode[c] = offset[c];
      for (int s = 0; s < NUM_STIM; s++) gain[s][c] = 0.0;
    end
    repeat (5) @(negedge clk);
    rst_n = 1;
    // A: 2 kS/s, 20 ms period (40 frames)
    workload("A (2 kS/s)", 64, 40, 70, 3.0);
    // B: 16 kS/s, 77 pulses/s: 13 ms = 208 frames of 8 channels
    workload("B (16 kS/s, 77 pulses/s)", 8, 208, 70, 1.1);
    // C: the four shapes, 400 us pulses
    shapes(int'(400e-6 / 16.0 * F_CLK));
    check(ser_drop_cnt == 0, "serializer kept up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
