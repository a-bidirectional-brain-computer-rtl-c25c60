// tb_channel_sequencer: checks the tick period, the channel order, the
// frame boundary strobe and prev_ch for a full 64-channel scan and for a
// shortened 8-channel scan (the 16 kS/s mode at the same tick rate).
module tb_channel_sequencer;
  localparam int NUM_CH = 64;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [11:0] tick_div;
  logic [6:0]  active_ch;
  logic tick, frame_tick;
  logic [5:0] ch, prev_ch;
  int checks = 0, failures = 0;

  channel_sequencer #(.NUM_CH(NUM_CH), .DIV_W(12)) dut (.*);

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

  task automatic run(input int div, input int nch, input int nticks);
    int exp_ch, last_tick, cyc, n;
    tick_div = 12'(div); active_ch = 7'(nch);
    if (nch == 0) nch = NUM_CH;
    enable = 1;
    exp_ch = 0; last_tick = -1; cyc = 0; n = 0;
    @(negedge clk);
    check(ch == 0, "scan starts at channel 0");
    while (n < nticks) begin
      if (tick) begin
        if (last_tick >= 0) check(cyc - last_tick == div, "tick period");
        last_tick = cyc;
        check(frame_tick == (exp_ch == nch - 1), "frame_tick at last channel");
        @(negedge clk); cyc++;
        check(prev_ch == 6'(exp_ch), "prev_ch");
        exp_ch = (exp_ch + 1) % nch;
        check(ch == 6'(exp_ch), "channel order");
        n++;
      end else begin
        check(!frame_tick, "no frame_tick without tick");
        @(negedge clk); cyc++;
      end
    end
    enable = 0;
    @(negedge clk);
  endtask

  initial begin
    tick_div = 0; active_ch = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(5, 64, 200);
    rst_n = 0; @(negedge clk); rst_n = 1;
    run(7, 8, 50);
    rst_n = 0; @(negedge clk); rst_n = 1;
    run(3, 0, 130);    // 0 means all channels
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
