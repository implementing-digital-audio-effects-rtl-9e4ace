// codec_clkgen: frequency divider that clocks the audio codec, which runs as
// an I2S slave. The codec is therefore fully synchronous to the FPGA system
// clock.
//
// From the 48 MHz system clock it derives
//   mclk_o  : codec master clock, clk / MCLK_DIV (12 MHz by default),
//   bclk_o  : I2S bit clock, clk / (2*BCLK_HALF) (3 MHz by default),
//   lrclk_o : I2S word select, low for the left and high for the right
//             channel, BCLKS_PER_CH bit clocks per channel.
// With the defaults one stereo frame lasts 2*34*16 = 1088 system clocks, so
// the frame rate is 48 MHz / 1088 = 44117 Hz, the sample rate the effect units
// are designed for. lrclk_o changes together with a falling edge of bclk_o, as
// I2S requires. All outputs are registered; reset starts a left channel.
//
// The original design states only that the codec clock comes from a hardware
// frequency divider; the division ratios are this design's choice, picked so
// that the frame rate is the 44117 Hz used throughout.
module codec_clkgen #(
  parameter int unsigned MCLK_DIV     = 4,   // even
  parameter int unsigned BCLK_HALF    = 8,   // system clocks per bclk half period
  parameter int unsigned BCLKS_PER_CH = 34   // bit clocks per channel (>= 25)
) (
  input  logic clk,
  input  logic rst_n,
  output logic mclk_o,
  output logic bclk_o,
  output logic lrclk_o
);
  localparam int unsigned MW = $clog2(MCLK_DIV / 2 + 1);
  localparam int unsigned DW = $clog2(2 * BCLK_HALF);
  localparam int unsigned BW = $clog2(2 * BCLKS_PER_CH);

  logic [MW-1:0] mcnt;
  logic [DW-1:0] dcnt;
  logic [BW-1:0] bcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mcnt   <= '0;
      mclk_o <= 1'b0;
    end else if (mcnt == MW'(MCLK_DIV / 2 - 1)) begin
      mcnt   <= '0;
      mclk_o <= ~mclk_o;
    end else begin
      mcnt   <= mcnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dcnt    <= '0;
      bcnt    <= '0;
      bclk_o  <= 1'b0;
      lrclk_o <= 1'b0;
    end else begin
      if (dcnt == DW'(2 * BCLK_HALF - 1)) dcnt <= '0;
      else                                dcnt <= dcnt + 1'b1;
      if (dcnt == DW'(BCLK_HALF - 1)) begin
        bclk_o <= 1'b1;
      end else if (dcnt == DW'(2 * BCLK_HALF - 1)) begin
        // falling edge of bclk: advance the bit slot, update word select
        bclk_o <= 1'b0;
        if (bcnt == BW'(2 * BCLKS_PER_CH - 1)) begin
          bcnt    <= '0;
          lrclk_o <= 1'b0;
        end else begin
          bcnt    <= bcnt + 1'b1;
          lrclk_o <= (bcnt + 1'b1) >= BW'(BCLKS_PER_CH);
        end
      end
    end
  end
endmodule
