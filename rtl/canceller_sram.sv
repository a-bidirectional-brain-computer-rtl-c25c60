// canceller_sram: code memory of one LMS filter bank.
//
// Holds the learned canceller codes x[slot][tap] of one stimulator: DEPTH
// words of WIDTH bits. The chip stores 16 artifacts of 32 taps x 10 bits
// (5120 bits) in on-chip SRAM; with four banks each bank owns a quarter,
// 128 words x 10 bits, which are this module's defaults. The loop reads a
// word and writes its update back one sample later, so the memory has one
// read and one write port (read-modify-write on different cycles).
//
// Timing: synchronous read; with re high, rdata shows mem[raddr] from the
// next cycle and holds until the next read. A write (we high) lands at the
// clock edge. On a read and write of the same word in one cycle the read
// returns the old word. Contents are cleared by reset (clr pulses clear
// the whole memory too), which a real SRAM macro would do by writing
// zeros; that reset behaviour is this design's choice.
module canceller_sram #(
  parameter int unsigned DEPTH  = 128,
  parameter int unsigned WIDTH  = 10,
  localparam int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata
);

  logic [WIDTH-1:0] mem_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem_q[i] <= '0;
      rdata <= '0;
    end else if (clr) begin
      for (int i = 0; i < DEPTH; i++) mem_q[i] <= '0;
      rdata <= '0;
    end else begin
      if (we) mem_q[waddr] <= wdata;
      if (re) rdata <= mem_q[raddr];
    end
  end

endmodule
