// tb_triggered_counter: a trigger starts the counter at tap 0 at once;
// it steps once per frame boundary through all 32 taps and goes idle; a
// trigger on a frame boundary also starts at tap 0; a retrigger during a
// run restarts it.
module tb_triggered_counter;
  localparam int TAPS = 32;
  logic clk = 0, rst_n = 0, trig = 0, frame_tick = 0;
  logic [4:0] tap;
  logic active;
  int checks = 0, failures = 0;

  triggered_counter #(.NUM_TAPS(TAPS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t tap=%0d act=%0d", what, $time, tap, active); end
  endtask

  task automatic frame();
    repeat (3) @(negedge clk);
    frame_tick = 1; @(negedge clk); frame_tick = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    frame();
    check(!active, "idle after reset");
    // trigger in mid frame
    @(negedge clk); trig = 1; @(negedge clk); trig = 0;
    check(active && tap == 0, "starts at tap 0 on the trigger");
    for (int n = 1; n < TAPS; n++) begin
      frame();
      check(active && tap == 5'(n), "tap sequence");
    end
    frame();
    check(!active, "idle after last tap");
    frame();
    check(!active, "stays idle");
    // trigger on the frame boundary
    repeat (2) @(negedge clk);
    trig = 1; frame_tick = 1; @(negedge clk); trig = 0; frame_tick = 0;
    check(active && tap == 0, "trigger on boundary starts at tap 0");
    for (int n = 1; n < 10; n++) begin
      frame();
      check(active && tap == 5'(n), "tap sequence 2");
    end
    // retrigger
    @(negedge clk); trig = 1; @(negedge clk); trig = 0;
    check(active && tap == 0, "retrigger restarts at tap 0");
    frame();
    check(active && tap == 1, "retrigger continues");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
