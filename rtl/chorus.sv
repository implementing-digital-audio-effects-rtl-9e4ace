// chorus: adds to the signal several copies of itself, each delayed by a
// fixed delay plus a delay that sweeps as a triangle wave.
//
// Per dry sample x:   y = sat(x + m_0 + ... + m_{V-1}),  buffer[wp] <= x
// with m_v = buffer[wp - D_v] and the delay of voice v in samples
//   D_v = fixdelay_i + (sweep_i * tri_v) / 2^(PH_W-1).
// tri_v rises from 0 to full scale and back once per LFO period. The voices
// share one PH_W-bit phase accumulator, which advances by lfo_inc_i per
// sample; voice v reads it offset by v/VOICES of a period, so with two voices
// one delay grows while the other shrinks. The sweep frequency is
// lfo_inc_i * fs / 2^PH_W (1 Hz ~ 380 at 44117 Hz and PH_W=24).
// The buffer is a ring of 2^BUF_AW words in processor-managed SDRAM; its
// relative addresses are 0 .. 2^BUF_AW-1. With BUF_AW = 11 (2048 samples,
// 46 ms) it holds the largest delay the chorus uses, 20 ms fixed plus 8 ms
// swept = 1236 samples. D must stay between 1 and 2^BUF_AW - 1.
//
// Processor-side protocol: one memory read per voice and sample, in voice
// order over the single read port. ram_rd_addr_o shows the word of the next
// voice to be read; it moves to the next voice in the clock after each
// ram_rd_valid_i, and to voice 0 of the next sample in the clock after
// wet_valid_o. The dry sample may arrive at any point of this sequence. In
// the clock after both the dry sample and the last voice's word have
// arrived, wet_o and the write of x at wp are issued together. With
// VOICES = 1 this is exactly the protocol of delay_fx.
//
// The fixed + triangle-swept delay (15-20 ms fixed, 4-8 ms swept, 1-5 Hz)
// and the several summed copies follow the original design. The number of
// voices (2 by default), their even phase spread, the phase accumulator, the
// unscaled sum and its saturation are this design's choices.
module chorus
  import dafx_pkg::*;
#(
  parameter int unsigned BUF_AW = 11,
  parameter int unsigned PH_W   = 24,
  parameter int unsigned VOICES = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // parameter settings (in samples and phase steps)
  input  logic [BUF_AW-1:0] fixdelay_i,
  input  logic [BUF_AW-1:0] sweep_i,
  input  logic [PH_W-1:0]   lfo_inc_i,
  // audio
  input  audio_t            dry_i,
  input  logic              dry_valid_i,
  output audio_t            wet_o,
  output logic              wet_valid_o,
  // effect memory
  output ram_addr_t         ram_wr_addr_o,
  output audio_t            ram_wr_data_o,
  output logic              ram_wr_valid_o,
  output ram_addr_t         ram_rd_addr_o,
  input  audio_t            ram_rd_data_i,
  input  logic              ram_rd_valid_i
);
  localparam int unsigned VC_W  = $clog2(VOICES + 1);
  localparam int unsigned SUM_W = AUDIO_W + VC_W;
  // phase offset between neighbouring voices: 1/VOICES of a period
  localparam logic [PH_W-1:0] VOICE_STEP = PH_W'((64'd1 << PH_W) / VOICES);

  logic [BUF_AW-1:0]          wp;
  logic [PH_W-1:0]            phase, vphase_c;
  logic [PH_W-2:0]            tri_c;
  logic [BUF_AW+PH_W-2:0]     sweep_prod;
  logic [BUF_AW-1:0]          delay_c, rd_c;
  logic [VC_W-1:0]            nread;          // voices read for this sample
  logic signed [SUM_W-1:0]    acc_q, acc_c;   // sum of the voices read so far
  audio_t                     x_q, x_c;
  logic                       have_x, all_c;

  wire go = (have_x || dry_valid_i) && all_c;

  always_comb begin
    // phase of the voice being read (nread saturates at VOICES after the last)
    vphase_c   = phase + PH_W'(VOICE_STEP * nread);
    // triangle: rising in the first half of the phase, falling in the second
    tri_c      = vphase_c[PH_W-1] ? ~vphase_c[PH_W-2:0] : vphase_c[PH_W-2:0];
    sweep_prod = sweep_i * tri_c;
    delay_c    = fixdelay_i + sweep_prod[BUF_AW+PH_W-2 -: BUF_AW];
    rd_c       = wp - delay_c;
    x_c        = have_x ? x_q : dry_i;
    acc_c      = acc_q + ((ram_rd_valid_i && nread < VC_W'(VOICES)) ? SUM_W'(ram_rd_data_i) : '0);
    all_c      = (nread == VC_W'(VOICES)) ||
                 (nread == VC_W'(VOICES - 1) && ram_rd_valid_i);
  end

  assign ram_rd_addr_o = ram_addr_t'(rd_c);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp             <= '0;
      phase          <= '0;
      x_q            <= '0;
      acc_q          <= '0;
      nread          <= '0;
      have_x         <= 1'b0;
      wet_o          <= '0;
      wet_valid_o    <= 1'b0;
      ram_wr_addr_o  <= '0;
      ram_wr_data_o  <= '0;
      ram_wr_valid_o <= 1'b0;
    end else begin
      wet_valid_o    <= 1'b0;
      ram_wr_valid_o <= 1'b0;
      if (go) begin
        have_x         <= 1'b0;
        nread          <= '0;
        acc_q          <= '0;
        wet_o          <= sat_audio(64'(x_c) + 64'(acc_c));
        wet_valid_o    <= 1'b1;
        ram_wr_addr_o  <= ram_addr_t'(wp);
        ram_wr_data_o  <= x_c;
        ram_wr_valid_o <= 1'b1;
        wp             <= wp + 1'b1;
        phase          <= phase + lfo_inc_i;
      end else begin
        if (dry_valid_i) begin
          x_q    <= dry_i;
          have_x <= 1'b1;
        end
        if (ram_rd_valid_i && nread < VC_W'(VOICES)) begin
          acc_q <= acc_c;
          nread <= nread + 1'b1;
        end
      end
    end
  end
endmodule
