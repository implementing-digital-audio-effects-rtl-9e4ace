// i2s_rx: serial-to-parallel converter for the codec's I2S output (ADC data).
//
// bclk_i, lrclk_i and sdata_i are sampled with the system clock (the codec is
// a slave clocked by codec_clkgen, so they are synchronous to clk and need no
// synchroniser). On each rising bit-clock edge one data bit is taken. The
// first bit slot after a word-select change is the I2S one-bit delay; the
// next 24 bits are the sample, MSB first; further slots are ignored.
// lrclk_i low marks the left, high the right channel.
//
// When the right-channel word is complete, left_o and right_o hold the new
// stereo sample and valid_o pulses for one clock: the "valid bit" that tells
// the processor that new data arrived. The outputs then stay stable until the
// next frame. The serial format details (I2S framing, left first, 24 bits) are
// this design's reading of the codec's standard I2S mode; the 24-bit parallel
// width and the valid bit follow the original design.
module i2s_rx
  import dafx_pkg::*;
#(
  parameter int unsigned WORD_W = AUDIO_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bclk_i,
  input  logic              lrclk_i,
  input  logic              sdata_i,
  output logic [WORD_W-1:0] left_o,
  output logic [WORD_W-1:0] right_o,
  output logic              valid_o
);
  localparam int unsigned CW = $clog2(WORD_W + 2);

  logic              bclk_q, lr_last;
  logic [CW-1:0]     cnt;
  logic [WORD_W-1:0] shreg, left_hold;
  wire               bclk_rise = bclk_i & ~bclk_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bclk_q    <= 1'b0;
      lr_last   <= 1'b1;
      cnt       <= CW'(WORD_W + 1);
      shreg     <= '0;
      left_hold <= '0;
      left_o    <= '0;
      right_o   <= '0;
      valid_o   <= 1'b0;
    end else begin
      bclk_q  <= bclk_i;
      valid_o <= 1'b0;
      if (bclk_rise) begin
        if (lrclk_i != lr_last) begin
          // one-bit delay slot after the word-select change
          lr_last <= lrclk_i;
          cnt     <= CW'(1);
        end else if (cnt <= CW'(WORD_W)) begin
          shreg <= {shreg[WORD_W-2:0], sdata_i};
          cnt   <= cnt + 1'b1;
          if (cnt == CW'(WORD_W)) begin
            if (!lr_last) begin
              left_hold <= {shreg[WORD_W-2:0], sdata_i};
            end else begin
              left_o  <= left_hold;
              right_o <= {shreg[WORD_W-2:0], sdata_i};
              valid_o <= 1'b1;
            end
          end
        end
      end
    end
  end
endmodule
