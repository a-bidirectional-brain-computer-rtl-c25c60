// tb_lms_filter_bank: one filter bank in a closed loop with a simple
// input model (the stored artifact minus the bank's own output, in ADC
// LSBs). A reference model of the bank's memory and tap counter predicts
// every art_out value and write-back; the test also checks that an
// unmapped or disabled channel reads 0, that adapt_en freezes the codes,
// and that the learned codes converge on the artifact.
module tb_lms_filter_bank;
  localparam int NUM_CH = 64, TAPS = 32, SLOTS = 4, CODE_W = 10, ADC_W = 8;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [SLOTS-1:0] slot_en;
  logic [SLOTS-1:0][5:0] slot_ch;
  logic [3:0] mu_shift;
  logic adapt_en, trig = 0, frame_tick = 0, upd = 0, adc_valid = 0;
  logic [5:0] ch = 0;
  logic signed [ADC_W-1:0] adc = 0;
  logic signed [CODE_W-1:0] art_out;
  logic busy, live;
  int checks = 0, failures = 0;

  lms_filter_bank #(.NUM_CH(NUM_CH), .NUM_TAPS(TAPS), .SLOTS(SLOTS),
                    .CODE_W(CODE_W), .ADC_W(ADC_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  int ref_mem [SLOTS][TAPS];
  int art_tab [SLOTS][TAPS];
  bit used [SLOTS][TAPS];         // words the loop has read     // artifact seen on each slot's channel (CDAC LSBs)
  int r_tap = 0; bit r_act = 0;
  int p_slot = -1, p_tap = 0;    // word read in the last slot
  int cur = 0;                   // channel now selected
  int next_adc = 0;

  function automatic int slot_of(int c);
    for (int s = 0; s < SLOTS; s++) if (slot_en[s] && int'(slot_ch[s]) == c) return s;
    return -1;
  endfunction

  function automatic int sat(int v, int lo, int hi);
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  // one sample slot of the multiplexer
  task automatic step_slot(input bit do_trig);
    int nxt, s, e;
    bit wrap;
    nxt  = (cur + 1) % NUM_CH;
    wrap = (nxt == 0);
    // tick cycle
    frame_tick = wrap; trig = do_trig;
    @(negedge clk);
    frame_tick = 0; trig = 0;
    // reference counter
    if (do_trig) begin r_tap = 0; r_act = 1; end
    else if (wrap && r_act) begin if (r_tap == TAPS - 1) r_act = 0; else r_tap++; end
    // upd cycle: adc of cur, new channel nxt
    ch = 6'(nxt); adc = ADC_W'(next_adc); adc_valid = 1; upd = 1;
    e = next_adc;
    @(negedge clk);
    upd = 0; adc_valid = 0;
    if (p_slot >= 0 && adapt_en)
      ref_mem[p_slot][p_tap] = sat(ref_mem[p_slot][p_tap] + (e >>> int'(mu_shift)), -512, 511);
    s = slot_of(nxt);
    p_slot = (r_act && s >= 0) ? s : -1;
    p_tap  = r_tap;
    if (p_slot >= 0) used[p_slot][p_tap] = 1;
    check(int'(art_out) == ((p_slot >= 0) ? ref_mem[p_slot][p_tap] : 0), "art_out");
    // input model: artifact of this channel at this tap minus the output
    next_adc = sat(((p_slot >= 0) ? art_tab[p_slot][p_tap] : 0) * 16 - int'(art_out) * 16, -128, 127);
    cur = nxt;
    @(negedge clk);
  endtask

  task automatic pulse(input int trig_slot);
    for (int k = 0; k < NUM_CH * (TAPS + 2); k++) step_slot(k == trig_slot);
  endtask

  int max_err;
  initial begin
    for (int s = 0; s < SLOTS; s++)
      for (int n = 0; n < TAPS; n++) begin
        ref_mem[s][n] = 0;
        used[s][n] = 0;
        art_tab[s][n] = int'($urandom % 401) - 200;
      end
    slot_ch = {6'd63, 6'd40, 6'd10, 6'd3};
    slot_en = 4'b1011;
    mu_shift = 5; adapt_en = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < 80; p++) pulse(17);
    max_err = 0;
    for (int s = 0; s < SLOTS; s++)
      if (s != 2)
        for (int n = 0; n < TAPS; n++)
          if (used[s][n] && ((art_tab[s][n] - ref_mem[s][n]) > max_err || (ref_mem[s][n] - art_tab[s][n]) > max_err))
            max_err = (art_tab[s][n] > ref_mem[s][n]) ? art_tab[s][n] - ref_mem[s][n]
                                                     : ref_mem[s][n] - art_tab[s][n];
    check(max_err <= 1, "codes converged on the artifact");
    // slot 2 disabled: nothing learned there
    for (int n = 0; n < TAPS; n++) check(ref_mem[2][n] == 0, "disabled slot untouched");
    // frozen adaptation, different step size
    adapt_en = 0;
    for (int s = 0; s < SLOTS; s++) for (int n = 0; n < TAPS; n++) art_tab[s][n] = -art_tab[s][n];
    pulse(5);
    mu_shift = 4; adapt_en = 1;
    pulse(5);
    // clear
    clr = 1; @(negedge clk); clr = 0;
    for (int s = 0; s < SLOTS; s++) for (int n = 0; n < TAPS; n++) ref_mem[s][n] = 0;
    p_slot = -1; next_adc = 0;
    pulse(0);
    $display("max error after learning %0d", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
