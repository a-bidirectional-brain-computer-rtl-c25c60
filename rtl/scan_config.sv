// scan_config: serial configuration chain.
//
// All programmable settings of the chip (stimulus waveforms and timing,
// canceller step sizes and channel map, recording scan length) are loaded
// through one serial scan input. While scan_en is high, one bit per clock
// is shifted in at scan_in, most significant bit of the record first, and
// the bit pushed out of the far end appears at scan_out (for read-back or
// chaining). A one-cycle scan_update pulse copies the shift register into
// the shadow register that drives cfg, so the running logic never sees a
// half-loaded record. Reset clears both registers: everything disabled.
//
// The chip is described only as scan-configurable; the shift/shadow
// structure, the single clock and the bit order are this design's choices.
module scan_config #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             scan_en,
  input  logic             scan_in,
  input  logic             scan_update,
  output logic             scan_out,
  output logic [WIDTH-1:0] cfg
);

  logic [WIDTH-1:0] shift_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift_q <= '0;
      cfg     <= '0;
    end else begin
      if (scan_en)     shift_q <= {shift_q[WIDTH-2:0], scan_in};
      if (scan_update) cfg     <= shift_q;
    end
  end

  assign scan_out = shift_q[WIDTH-1];

endmodule
