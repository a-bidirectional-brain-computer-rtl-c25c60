// triggered_counter: tap counter of one LMS filter bank.
//
// A stimulus artifact is learned as a sequence of NUM_TAPS canceller codes,
// one per recording frame (one pass over all scanned channels), counted
// from the stimulation trigger. This counter gives the tap index n. A
// trigger pulse starts it at tap 0 at once, so the channels still to be
// sampled in the current frame use tap 0; on each frame_tick (the tick
// that starts a new frame) it advances by one, and after the last tap it
// goes idle until the next trigger. A trigger while it runs restarts it.
// Every channel therefore sees the same tap sequence relative to the
// stimulus as long as the trigger falls at the same point of a frame
// from pulse to pulse.
//
// That a counter started by the stimulation trigger addresses the taps
// follows the chip description; the restart rule is this design's choice.
//
// Timing: tap and active change at the clock edge after trig or
// frame_tick, together with the channel select.
module triggered_counter #(
  parameter int unsigned NUM_TAPS = 32,
  localparam int unsigned TAP_W   = $clog2(NUM_TAPS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             trig,
  input  logic             frame_tick,
  output logic [TAP_W-1:0] tap,
  output logic             active
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tap    <= '0;
      active <= 1'b0;
    end else if (trig) begin
      tap    <= '0;
      active <= 1'b1;
    end else if (frame_tick && active) begin
      if (tap == TAP_W'(NUM_TAPS - 1)) active <= 1'b0;
      else                             tap    <= tap + TAP_W'(1);
    end
  end

endmodule
