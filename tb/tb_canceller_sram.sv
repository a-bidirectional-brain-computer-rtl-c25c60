// tb_canceller_sram: random reads and writes against a reference array;
// checks the one-cycle read latency, read-before-write on a shared
// address, that rdata holds without a read, and clearing.
module tb_canceller_sram;
  localparam int DEPTH = 128, WIDTH = 10;
  logic clk = 0, rst_n = 0, clr = 0, re = 0, we = 0;
  logic [6:0] raddr = 0, waddr = 0;
  logic [WIDTH-1:0] rdata, wdata = 0;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  canceller_sram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] expd, held;
    logic rd;
    for (int i = 0; i < DEPTH; i++) ref_mem[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    held = '0;
    for (int k = 0; k < 4000; k++) begin
      re = 1'($urandom); we = 1'($urandom);
      raddr = 7'($urandom); waddr = ($urandom % 4 == 0) ? raddr : 7'($urandom);
      wdata = WIDTH'($urandom);
      rd = re;
      expd = ref_mem[raddr];
      @(negedge clk);
      if (we) ref_mem[waddr] = wdata;
      if (rd) held = expd;
      check(rdata == held, "read data");
    end
    re = 0; we = 0;
    clr = 1; @(negedge clk); clr = 0;
    for (int i = 0; i < DEPTH; i++) begin
      re = 1; raddr = 7'(i); @(negedge clk);
      check(rdata == '0, "cleared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
