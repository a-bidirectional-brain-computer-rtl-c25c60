// tb_delta_encoder: drives channel slots with random ADC residuals and
// shift settings and compares dac_out with a reference integrator per
// channel, including saturation, the single-channel forwarding case and
// clearing while disabled.
module tb_delta_encoder;
  localparam int NUM_CH = 64, CODE_W = 10, ADC_W = 8;
  logic clk = 0, rst_n = 0, en = 0, upd = 0, adc_valid = 0;
  logic [3:0] shift = 0;
  logic [5:0] ch = 0, prev_ch = 0;
  logic signed [ADC_W-1:0] adc = 0;
  logic signed [CODE_W-1:0] dac_out;
  int ref_mem [NUM_CH];
  int checks = 0, failures = 0;
  int sat_hits = 0;

  delta_encoder #(.NUM_CH(NUM_CH), .CODE_W(CODE_W), .ADC_W(ADC_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one slot: adc belongs to p, c becomes selected
  task automatic slot(input int p, input int c, input int a, input int sh, input bit valid);
    int v;
    prev_ch = 6'(p); ch = 6'(c); adc = ADC_W'(a); shift = 4'(sh); adc_valid = valid;
    upd = 1; @(negedge clk); upd = 0; adc_valid = 0;
    if (!en) ref_mem[p] = 0;
    else if (valid) begin
      v = ref_mem[p] + (a >>> sh);
      if (v > 511) begin v = 511; sat_hits++; end
      if (v < -512) begin v = -512; sat_hits++; end
      ref_mem[p] = v;
    end
    check(int'(dac_out) == (en ? ref_mem[c] : 0), "dac_out");
    repeat (2) @(negedge clk);
    check(int'(dac_out) == (en ? ref_mem[c] : 0), "dac_out holds");
  endtask

  initial begin
    int c, p;
    for (int i = 0; i < NUM_CH; i++) ref_mem[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    en = 1;
    c = 0;
    for (int k = 0; k < 3000; k++) begin
      p = c; c = (c + 1) % NUM_CH;
      slot(p, c, $signed(8'($urandom)), (k < 1500) ? 4 : int'($urandom % 6), 1'($urandom % 8 != 0));
    end
    // drive two channels into saturation, both signs
    for (int k = 0; k < 12; k++) begin
      slot(1, 2, 127, 0, 1);
      slot(2, 1, -128, 0, 1);
    end
    // a single scanned channel forwards its fresh word
    for (int k = 0; k < 20; k++) slot(5, 5, $signed(8'($urandom)), 2, 1);
    // disabled: output 0 and words clear as their channel passes
    en = 0;
    for (int k = 0; k < NUM_CH; k++) slot(k, (k + 1) % NUM_CH, 100, 0, 1);
    en = 1;
    for (int k = 0; k < NUM_CH; k++) slot(k, (k + 1) % NUM_CH, 0, 0, 1);
    check(sat_hits > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
