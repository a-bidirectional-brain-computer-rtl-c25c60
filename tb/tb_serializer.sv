// tb_serializer: loads random frames at the sample rate, receives the
// serial stream by sampling ser_data on rising ser_clk edges (frames
// start at ser_sync), compares every field, and checks that a load during
// a frame is dropped and counted.
module tb_serializer;
  localparam int CH_W = 6, ADC_W = 8, CODE_W = 10, FW = CH_W + ADC_W + 2 * CODE_W;
  logic clk = 0, rst_n = 0, load = 0;
  logic [CH_W-1:0] ch = 0;
  logic [ADC_W-1:0] adc = 0;
  logic [CODE_W-1:0] dac = 0, art = 0;
  logic ser_clk, ser_data, ser_sync, busy;
  logic [7:0] drop_cnt;
  logic [FW-1:0] sent [$];
  int checks = 0, failures = 0, frames = 0;

  serializer #(.CH_W(CH_W), .ADC_W(ADC_W), .CODE_W(CODE_W)) dut (.*);

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

  // receiver
  logic [FW-1:0] rx;
  int nbits = 0;
  logic ser_clk_d = 0;
  always @(posedge clk) begin
    ser_clk_d <= ser_clk;
    if (ser_clk && !ser_clk_d) begin
      if (ser_sync) nbits = 0;
      rx = {rx[FW-2:0], ser_data};
      nbits++;
      if (nbits == FW) begin
        logic [FW-1:0] e;
        e = sent.pop_front();
        check(rx == e, "received frame");
        frames++;
      end
    end
  end

  initial begin
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      ch = CH_W'($urandom); adc = ADC_W'($urandom); dac = CODE_W'($urandom); art = CODE_W'($urandom);
      load = 1; sent.push_back({ch, adc, dac, art});
      @(negedge clk); load = 0;
      cyc = 1;
      while (busy) begin @(negedge clk); cyc++; end
      check(cyc == 2 * FW + 1, "frame length 2*FW cycles");
      repeat (int'($urandom % 5)) @(negedge clk);
    end
    // load during a frame is dropped
    load = 1; sent.push_back('1); ch = '1; adc = '1; dac = '1; art = '1;
    @(negedge clk); load = 1; ch = 0;
    @(negedge clk); load = 0;
    while (busy) @(negedge clk);
    repeat (4) @(negedge clk);
    check(drop_cnt == 8'd1, "dropped load counted");
    check(frames == 201, "all frames received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
