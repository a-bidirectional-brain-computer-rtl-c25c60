// tb_stim_controller: programs random biphasic waveforms, triggers them
// from the pad and checks, cycle by cycle, the IDAC code, bridge
// switches and pump enables against the table; checks the trigger
// latency, the pulse length, active discharge ended by the comparator or
// by its timer, passive discharge, that a pad edge during a pulse is
// ignored, and that with slot_start low a pulse waits for the next
// slot_start cycle.
module tb_stim_controller;
  localparam int WL = 16, WW = 8, IW = 8, TW = 12;
  logic clk = 0, rst_n = 0;
  logic [WL-1:0][WW-1:0] wave;
  logic [TW-1:0] step_len, dis_len;
  logic dis_active;
  logic [IW-1:0] dis_code;
  logic trig_pad = 0, slot_start = 1, supply_cmp = 0, track_cmp = 0;
  logic [IW-1:0] idac_code;
  logic pump_en_p, pump_en_n, lsw_p, lsw_n, dis_res_en, track_mode, trig_out, busy;
  int checks = 0, failures = 0;

  stim_controller #(.WAVE_LEN(WL), .WAVE_W(WW), .IDAC_W(IW), .TIME_W(TW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one stimulus; dis_mode 0 passive, 1 active ended by comparator, 2 active timeout
  // align > 0: slot_start stays low for align cycles after the pad edge
  task automatic pulse(input int sl, input int dmode, input int dlen, input int align = 0);
    int s, mag, flip_at, dcyc;
    step_len = TW'(sl); dis_active = (dmode != 0); dis_code = 8'd77; dis_len = TW'(dlen);
    track_cmp = 1'($urandom);
    slot_start = (align == 0);
    trig_pad = 1;
    @(negedge clk); check(!busy && !trig_out, "latency 1");
    @(negedge clk); check(!busy, "latency 2");
    if (align > 0) begin
      trig_pad = 0;
      repeat (align) begin
        check(!trig_out, "no trigger before slot start");
        @(negedge clk); check(!busy, "waits for slot start");
      end
      slot_start = 1; #1;
      check(trig_out, "trigger in the slot start cycle");
      @(negedge clk); check(busy, "pulse starts after slot start");
    end else begin
      check(trig_out, "trigger one cycle before the current");
      @(negedge clk); check(busy, "pulse starts 3 cycles after pad edge");
    end
    slot_start = 1'($urandom);
    trig_pad = 0;
    for (int k = 0; k < WL; k++) begin
      s = $signed(wave[k]);
      mag = (s < 0) ? -s : s;
      for (int c = 0; c < ((sl == 0) ? 1 : sl); c++) begin
        supply_cmp = 1'($urandom); #1;
        check(int'(idac_code) == mag, "idac magnitude");
        check(lsw_n == (s > 0) && lsw_p == (s < 0), "return-side switch");
        check(pump_en_p == (s > 0 && supply_cmp) && pump_en_n == (s < 0 && supply_cmp),
              "pump gated by supply comparator");
        check(!track_mode && !dis_res_en, "no discharge during pulse");
        if (k == 3 && c == 0) trig_pad = 1;    // ignored while busy
        check(!trig_out, "single trigger pulse");
        @(negedge clk);
      end
    end
    trig_pad = 0;
    flip_at = 5;
    dcyc = 0;
    while (busy) begin
      check(track_mode, "comparator in tracking mode");
      if (dmode == 0) check(dis_res_en && idac_code == 0 && !lsw_p && !lsw_n, "passive discharge");
      else check(!dis_res_en && idac_code == 77 && (lsw_p != lsw_n), "active discharge");
      if (dmode == 1 && dcyc == flip_at) track_cmp = !track_cmp;
      @(negedge clk); dcyc++;
    end
    if (dmode == 1) check(dcyc == flip_at + 1, "active discharge ends on comparator flip");
    else check(dcyc == dlen + 1, "discharge ends on timer");
    check(idac_code == 0 && !lsw_p && !lsw_n && !dis_res_en && !track_mode, "bridge idle");
    repeat (3) @(negedge clk);
  endtask

  initial begin
    for (int k = 0; k < WL; k++) wave[k] = WW'($urandom);
    wave[7] = 0;       // interphase gap
    wave[0] = 8'h80;   // largest magnitude
    step_len = 1; dis_len = 10; dis_active = 0; dis_code = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    pulse(3, 0, 20);
    for (int k = 0; k < WL; k++) wave[k] = WW'($urandom);
    pulse(1, 1, 100);
    pulse(5, 2, 30);
    pulse(0, 0, 4);
    pulse(2, 1, 50, 7);
    pulse(1, 0, 6, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
