// tb_scan_config: shifts random records through the scan chain and checks
// that cfg changes only on scan_update, equals the record shifted in
// (first bit = MSB), and that scan_out returns the old record bit by bit.
module tb_scan_config;
  localparam int W = 64;
  logic clk = 0, rst_n = 0, scan_en = 0, scan_in = 0, scan_update = 0;
  logic scan_out;
  logic [W-1:0] cfg;
  int checks = 0, failures = 0;

  scan_config #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] rec [3];
    logic [W-1:0] outw;
    for (int i = 0; i < 3; i++) rec[i] = {$urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(cfg == '0, "cfg cleared by reset");
    for (int r = 0; r < 3; r++) begin
      outw = '0;
      for (int b = W - 1; b >= 0; b--) begin
        scan_en = 1; scan_in = rec[r][b];
        outw = {outw[W-2:0], scan_out};   // bit leaving before this shift
        @(negedge clk);
      end
      scan_en = 0;
      check(cfg == ((r == 0) ? '0 : rec[r-1]), "cfg held while shifting");
      check(outw == ((r == 0) ? '0 : rec[r-1]), "scan_out returns previous record");
      scan_update = 1; @(negedge clk); scan_update = 0;
      check(cfg == rec[r], "cfg loaded on update");
      repeat (3) @(negedge clk);
      check(cfg == rec[r], "cfg stable after update");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
