// i2s_tx: parallel-to-serial converter feeding the codec's I2S input (DAC
// data).
//
// A stereo sample is offered on left_i/right_i with a one-clock valid_i and is
// held in a buffer; it is sent from the next left word on. bclk_i and lrclk_i
// come from codec_clkgen and are sampled with the system clock. On each
// falling bit-clock edge the next bit is driven: after a word-select change
// one delay slot (0), then the 24 sample bits MSB first, then zeros until the
// next word. If no new sample arrives the last one is repeated. sdata_o
// changes one system clock after the bit-clock fall, well before the codec
// samples it on the rising edge.
//
// The original design states only that a parallel-to-serial unit sends the 24-bit
// data to the codec; framing and the hold/repeat behaviour are this design's
// choice.
module i2s_tx
  import dafx_pkg::*;
#(
  parameter int unsigned WORD_W = AUDIO_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bclk_i,
  input  logic              lrclk_i,
  input  logic [WORD_W-1:0] left_i,
  input  logic [WORD_W-1:0] right_i,
  input  logic              valid_i,
  output logic              sdata_o
);
  localparam int unsigned CW = $clog2(WORD_W + 2);

  logic              bclk_q, lr_last;
  logic [CW-1:0]     cnt;
  logic [WORD_W-1:0] shreg, left_buf, right_buf, right_frame;
  wire               bclk_fall = ~bclk_i & bclk_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bclk_q      <= 1'b0;
      lr_last     <= 1'b1;
      cnt         <= CW'(WORD_W + 1);
      shreg       <= '0;
      left_buf    <= '0;
      right_buf   <= '0;
      right_frame <= '0;
      sdata_o     <= 1'b0;
    end else begin
      bclk_q <= bclk_i;
      if (valid_i) begin
        left_buf  <= left_i;
        right_buf <= right_i;
      end
      if (bclk_fall) begin
        if (lrclk_i != lr_last) begin
          lr_last <= lrclk_i;
          cnt     <= CW'(1);
          sdata_o <= 1'b0;
          if (!lrclk_i) begin
            // a frame starts: take both channels of the buffered sample
            shreg       <= left_buf;
            right_frame <= right_buf;
          end else begin
            shreg <= right_frame;
          end
        end else if (cnt <= CW'(WORD_W)) begin
          sdata_o <= shreg[WORD_W-1];
          shreg   <= {shreg[WORD_W-2:0], 1'b0};
          cnt     <= cnt + 1'b1;
        end else begin
          sdata_o <= 1'b0;
        end
      end
    end
  end
endmodule
