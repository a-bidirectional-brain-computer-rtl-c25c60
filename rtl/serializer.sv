// serializer: source-synchronous serial output of the recorded samples.
//
// Every recorded sample leaves the chip as one frame on two wires, data
// and a forwarded clock, so that an FPGA can rebuild the full-resolution
// signal and run further processing. A frame holds, most significant bit
// first: the channel number, the 8-bit ADC output, the 10-bit delta
// encoder code ("DAC Out") and the 10-bit canceller code ("ART Out") that
// were applied while the sample was taken; the receiver reconstructs the
// electrode signal from the three codes.
//
// ser_clk runs at half the core clock while a frame is sent. ser_data
// changes on the falling edge of ser_clk and is to be sampled on its
// rising edge; ser_sync is high during the first bit. A load that arrives
// while a frame is still being sent is dropped and counted in
// drop_cnt (saturating). A frame takes 2*FRAME_W core cycles, so the
// sample period must be at least that long.
// That the ADC, DAC and ART codes leave through a serializer follows the
// chip description; the frame layout, clocking and drop rule are this
// design's choices.
module serializer #(
  parameter int unsigned CH_W   = 6,
  parameter int unsigned ADC_W  = 8,
  parameter int unsigned CODE_W = 10,
  localparam int unsigned FRAME_W = CH_W + ADC_W + 2 * CODE_W,
  localparam int unsigned CNT_W   = $clog2(FRAME_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [CH_W-1:0]   ch,
  input  logic [ADC_W-1:0]  adc,
  input  logic [CODE_W-1:0] dac,
  input  logic [CODE_W-1:0] art,
  output logic              ser_clk,
  output logic              ser_data,
  output logic              ser_sync,
  output logic              busy,
  output logic [7:0]        drop_cnt
);

  logic [FRAME_W-1:0] shreg_q;
  logic [CNT_W-1:0]   bit_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg_q  <= '0;
      bit_q    <= '0;
      busy     <= 1'b0;
      ser_clk  <= 1'b0;
      drop_cnt <= '0;
    end else if (!busy) begin
      ser_clk <= 1'b0;
      if (load) begin
        shreg_q <= {ch, adc, dac, art};
        bit_q   <= '0;
        busy    <= 1'b1;
      end
    end else begin
      if (load && drop_cnt != '1) drop_cnt <= drop_cnt + 8'd1;
      ser_clk <= !ser_clk;
      if (ser_clk) begin            // falling edge: next bit
        shreg_q <= {shreg_q[FRAME_W-2:0], 1'b0};
        if (bit_q == CNT_W'(FRAME_W - 1)) busy <= 1'b0;
        else                              bit_q <= bit_q + CNT_W'(1);
      end
    end
  end

  assign ser_data = busy && shreg_q[FRAME_W-1];
  assign ser_sync = busy && (bit_q == '0);

endmodule
