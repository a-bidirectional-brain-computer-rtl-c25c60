// tb_artifact_canceller: the four-bank canceller in a closed loop with the
// front-end model. Two stimulators produce different artifacts on
// overlapping channels and fire with changing relative delays, so their
// artifacts overlap in varying ways. Checks: the CDAC code equals the
// saturated sum of the delta code and the canceller output in every slot,
// the canceller output is 0 and nothing adapts while cancel_en is low,
// after learning the residual seen by the ADC shrinks to about one
// CDAC step while it spanned the ADC range at first, and, with learning
// frozen, the output for both stimulators together is the saturated sum
// of the outputs for each alone.
module tb_artifact_canceller;
  localparam int NUM_CH = 64, NS = 4, TAPS = 32, SLOTS = 4, CODE_W = 10, ADC_W = 8;
  logic clk = 0, rst_n = 0, clr = 0, cancel_en = 0;
  logic [NS-1:0][SLOTS-1:0] slot_en;
  logic [NS-1:0][SLOTS-1:0][5:0] slot_ch;
  logic [NS-1:0][3:0] mu_shift;
  logic [NS-1:0] adapt_en, trig = 0, busy;
  logic frame_tick = 0, upd = 0, adc_valid = 0;
  logic [5:0] ch = 0;
  logic signed [ADC_W-1:0] adc = 0, afe_adc;
  logic signed [CODE_W-1:0] dac_in = 0, art_out, cdac_code;
  logic afe_clip, live;
  int electrode [NUM_CH];
  int checks = 0, failures = 0;

  artifact_canceller #(.NUM_CH(NUM_CH), .NUM_STIM(NS), .NUM_TAPS(TAPS), .SLOTS(SLOTS),
                       .CODE_W(CODE_W), .ADC_W(ADC_W)) dut (.*);

  rec_afe_model #(.NUM_CH(NUM_CH)) afe (
    .mux_sel(ch), .cdac_code(cdac_code), .electrode(electrode),
    .adc_code(afe_adc), .clipped(afe_clip));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int D [NUM_CH];                 // slow content held by the delta code
  int gain [2][NUM_CH];           // artifact coupling per stimulator and channel
  int t_tap [2]; bit t_act [2];
  int cur = 0;
  int max_res;                    // largest residual in the current window
  bit log_on = 0;                 // record the canceller output of each slot
  int log_idx = 0;
  int art_log [40 * NUM_CH];

  function automatic int shape(int s, int n);
    // stim 0: decaying, stim 1: biphasic square (ADC LSBs for gain 1)
    if (s == 0) return (n < 24) ? (24 - n) * 10 : 0;
    else        return (n < 6) ? 150 : (n < 12) ? -150 : 0;
  endfunction

  function automatic int sat(int v, int lo, int hi);
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  task automatic step_slot(input logic [1:0] tg);
    int nxt, v;
    bit wrap;
    nxt  = (cur + 1) % NUM_CH;
    wrap = (nxt == 0);
    // electrode voltage of the channel being converted
    v = D[cur] * 16;
    for (int s = 0; s < 2; s++) if (t_act[s]) v += gain[s][cur] * shape(s, t_tap[s]) / 4;
    electrode[cur] = v;
    #1;
    if (t_act[0] || t_act[1]) begin
      if (int'(afe_adc) > max_res) max_res = int'(afe_adc);
      if (-int'(afe_adc) > max_res) max_res = -int'(afe_adc);
    end
    // tick cycle
    frame_tick = wrap; trig = {2'b00, tg};
    @(negedge clk);
    frame_tick = 0; trig = '0;
    adc = afe_adc;
    for (int s = 0; s < 2; s++)
      if (tg[s]) begin t_tap[s] = 0; t_act[s] = 1; end
      else if (wrap && t_act[s]) begin if (t_tap[s] == TAPS - 1) t_act[s] = 0; else t_tap[s]++; end
    // upd cycle
    ch = 6'(nxt); adc_valid = 1; upd = 1;
    @(negedge clk);
    upd = 0; adc_valid = 0;
    dac_in = CODE_W'(D[nxt]);
    @(negedge clk);
    @(negedge clk);
    check(int'(cdac_code) == sat(D[nxt] + (cancel_en ? int'(art_out) : 0), -512, 511),
          "cdac = sat(dac + art)");
    if (!cancel_en) check(art_out == 0, "no output while disabled");
    if (log_on) art_log[log_idx++] = int'(art_out);
    @(negedge clk);
    cur = nxt;
  endtask

  // one period with learning frozen in which stim s fires at frame 0 if
  // en[s]; the canceller output of every slot goes to art_log
  task automatic frozen_period(input logic [1:0] en);
    log_on = 1; log_idx = 0;
    for (int f = 0; f < 40; f++)
      for (int c = 0; c < NUM_CH; c++)
        step_slot((f == 0 && c == 10) ? en : 2'b00);
    log_on = 0;
  endtask

  // one period of 40 frames; stim 0 fires at frame 0, stim 1 at frame off
  task automatic period(input int off);
    for (int f = 0; f < 40; f++)
      for (int c = 0; c < NUM_CH; c++)
        step_slot({(f == off && c == 10), (f == 0 && c == 10)});
  endtask

  int first_res, last_res;
  int art0 [40 * NUM_CH], art1 [40 * NUM_CH];
  int nonzero = 0;
  initial begin
    for (int c = 0; c < NUM_CH; c++) begin
      D[c] = int'($urandom % 200) - 100;
      electrode[c] = D[c] * 16;
      gain[0][c] = (c < 4) ? 4 : 0;
      gain[1][c] = (c >= 2 && c < 6) ? 3 + c % 2 : 0;
    end
    slot_ch[0] = {6'd3, 6'd2, 6'd1, 6'd0};
    slot_ch[1] = {6'd5, 6'd4, 6'd3, 6'd2};
    slot_ch[2] = '0; slot_ch[3] = '0;
    slot_en = {4'b0000, 4'b0000, 4'b1111, 4'b1111};
    mu_shift = {4'd5, 4'd5, 4'd5, 4'd5};
    adapt_en = 4'b1111;
    t_act = '{0, 0}; t_tap = '{0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // disabled: nothing applied, nothing learned
    max_res = 0;
    period(3);
    check(max_res >= 100, "artifact visible without cancellation");
    cancel_en = 1;
    max_res = 0;
    period(3);
    first_res = max_res;
    check(first_res >= 100, "first learning pulse still sees the artifact");
    for (int p = 0; p < 60; p++) period(3 + (p * 7) % 17);
    max_res = 0;
    period(9);
    last_res = max_res;
    $display("residual peak: first %0d, last %0d ADC LSB", first_res, last_res);
    check(last_res <= 32, "artifact cancelled to within two CDAC steps");
    // superposition: with learning frozen, the output for both stimulators
    // together is the saturated sum of the outputs for each alone
    adapt_en = '0;
    frozen_period(2'b01); art0 = art_log;
    frozen_period(2'b10); art1 = art_log;
    frozen_period(2'b11);
    for (int i = 0; i < 40 * NUM_CH; i++) begin
      check(art_log[i] == sat(art0[i] + art1[i], -512, 511), "output is the sum of the banks");
      if (art0[i] != 0 && art1[i] != 0) nonzero++;
    end
    $display("slots where both banks contribute: %0d", nonzero);
    check(nonzero >= 16, "both banks contribute on shared channels");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
