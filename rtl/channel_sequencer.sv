// channel_sequencer: sample clock and channel scan of the multiplexed
// recording chain.
//
// The 64 electrodes share one CDAC, amplifier and ADC through a 64:1
// multiplexer. This block divides the core clock into the per-channel
// sample strobe (tick, one clock wide, every tick_div cycles; the chip
// runs it at 128 kHz, i.e. 64 channels at 2 kS/s) and advances the
// multiplexer select (ch) on every tick through channels
// 0 .. active_ch-1. Scanning fewer channels raises the per-channel rate
// (8 channels at 128 kHz give 16 kS/s). frame_tick is the tick on which
// the scan wraps back to channel 0 (the start of a new frame). prev_ch
// is the channel selected before the last tick: the ADC result that
// becomes valid at a tick belongs to it.
//
// Timing: tick and frame_tick are combinational strobes; ch and prev_ch
// change at the clock edge that ends the tick cycle, so every consumer
// sees the new channel in the cycle after tick. tick_div below 2 is treated as 2; active_ch of 0 or above
// NUM_CH is treated as NUM_CH. Both limits are this design's choices.
module channel_sequencer #(
  parameter int unsigned NUM_CH = 64,
  parameter int unsigned DIV_W  = 12,
  localparam int unsigned CH_W  = $clog2(NUM_CH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable,
  input  logic [DIV_W-1:0] tick_div,
  input  logic [CH_W:0]   active_ch,
  output logic            tick,
  output logic [CH_W-1:0] ch,
  output logic [CH_W-1:0] prev_ch,
  output logic            frame_tick
);

  logic [DIV_W-1:0] div_q;
  logic [DIV_W-1:0] div_lim;
  logic [CH_W:0]    n_ch;
  logic             wrap;

  always_comb begin
    div_lim = (tick_div < DIV_W'(2)) ? DIV_W'(1) : tick_div - DIV_W'(1);
    n_ch    = (active_ch == '0 || active_ch > (CH_W+1)'(NUM_CH)) ? (CH_W+1)'(NUM_CH) : active_ch;
  end

  assign tick       = enable && (div_q == div_lim);
  assign wrap       = ({1'b0, ch} + (CH_W+1)'(1) >= n_ch);
  assign frame_tick = tick && wrap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_q   <= '0;
      ch      <= '0;
      prev_ch <= '0;
    end else if (!enable) begin
      div_q   <= '0;
    end else begin
      div_q <= tick ? '0 : div_q + DIV_W'(1);
      if (tick) begin
        prev_ch <= ch;
        if (wrap) begin
          ch          <= '0;
        end else begin
          ch          <= ch + CH_W'(1);
        end
      end
    end
  end

endmodule
