// dafx_top: FPGA-side hardware of the audio effects system.
//
// Audio from the codec arrives as I2S, is converted to 24-bit parallel
// stereo samples with a valid pulse (i2s_rx) and handed to the processor; the
// processor routes samples through any of the hardware effect units in any
// order, one sample at a time, and finally hands a stereo sample back for
// I2S output (i2s_tx). The codec is a slave; codec_clkgen divides the 48 MHz
// system clock into its master, bit and word clocks (44117 Hz frames).
//
// Every effect unit has its own processor-facing ports, as parallel I/O of
// the processor: parameter settings, dry sample + valid in, wet sample +
// valid out. The delay-based units (delay_fx, chorus, flanger) keep their
// audio buffer in the SDRAM, which only the processor can reach: they show a
// relative read address and a relative write address/word, and the
// processor moves the words (ram_* ports, see delay_fx for the handshake;
// the chorus asks for one read per voice and sample).
// The wahwah keeps its coefficient table on chip; the echo canceller keeps
// its 1300-tap delay line and weights in on-chip memory.
//
// The processor itself, its SDRAM controller, UART (MIDI), SPI (codec and
// clock-chip configuration) and the PLL are not part of this RTL; their
// connections are this module's ports. All ports are synchronous to clk;
// rst_n is an active-low asynchronous reset.
//
// Following the original design: the effect set, the per-effect data/parameter/RAM
// ports with 24-bit audio and valid bits, the I2S conversion units and the
// codec clock divider. The port naming and the split of the parameter
// registers are this design's choice.
module dafx_top
  import dafx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // audio codec pins
  output logic        codec_mclk_o,
  output logic        codec_bclk_o,
  output logic        codec_lrclk_o,
  input  logic        codec_adc_i,
  output logic        codec_dac_o,
  // codec samples to and from the processor
  output audio_t      rx_left_o,
  output audio_t      rx_right_o,
  output logic        rx_valid_o,
  input  audio_t      tx_left_i,
  input  audio_t      tx_right_i,
  input  logic        tx_valid_i,
  // delay (echo / slapback)
  input  ram_addr_t   dly_delaytime_i,
  input  audio_t      dly_level_i,
  input  audio_t      dly_dry_i,
  input  logic        dly_dry_valid_i,
  output audio_t      dly_wet_o,
  output logic        dly_wet_valid_o,
  output ram_addr_t   dly_ram_wr_addr_o,
  output audio_t      dly_ram_wr_data_o,
  output logic        dly_ram_wr_valid_o,
  output ram_addr_t   dly_ram_rd_addr_o,
  input  audio_t      dly_ram_rd_data_i,
  input  logic        dly_ram_rd_valid_i,
  // chorus
  input  logic [10:0] cho_fixdelay_i,
  input  logic [10:0] cho_sweep_i,
  input  logic [23:0] cho_lfo_inc_i,
  input  audio_t      cho_dry_i,
  input  logic        cho_dry_valid_i,
  output audio_t      cho_wet_o,
  output logic        cho_wet_valid_o,
  output ram_addr_t   cho_ram_wr_addr_o,
  output audio_t      cho_ram_wr_data_o,
  output logic        cho_ram_wr_valid_o,
  output ram_addr_t   cho_ram_rd_addr_o,
  input  audio_t      cho_ram_rd_data_i,
  input  logic        cho_ram_rd_valid_i,
  // flanger
  input  logic [9:0]  fla_base_i,
  input  logic [9:0]  fla_depth_i,
  input  logic [23:0] fla_lfo_inc_i,
  input  audio_t      fla_level_i,
  input  audio_t      fla_dry_i,
  input  logic        fla_dry_valid_i,
  output audio_t      fla_wet_o,
  output logic        fla_wet_valid_o,
  output ram_addr_t   fla_ram_wr_addr_o,
  output audio_t      fla_ram_wr_data_o,
  output logic        fla_ram_wr_valid_o,
  output ram_addr_t   fla_ram_rd_addr_o,
  input  audio_t      fla_ram_rd_data_i,
  input  logic        fla_ram_rd_valid_i,
  // wah-wah
  input  logic [9:0]  wah_fc_idx_i,
  input  logic        wah_mode_i,
  input  audio_t      wah_dry_i,
  input  logic        wah_dry_valid_i,
  output audio_t      wah_wet_o,
  output logic        wah_wet_valid_o,
  // echo canceller
  input  logic [23:0] aec_mu_i,
  input  audio_t      aec_u_i,
  input  audio_t      aec_d_i,
  input  logic        aec_valid_i,
  output logic        aec_ready_o,
  output audio_t      aec_e_o,
  output audio_t      aec_y_o,
  output logic        aec_valid_o,
  output logic        aec_overrun_o
);
  logic bclk, lrclk;

  assign codec_bclk_o  = bclk;
  assign codec_lrclk_o = lrclk;

  codec_clkgen u_clkgen (
    .clk(clk), .rst_n(rst_n), .mclk_o(codec_mclk_o), .bclk_o(bclk), .lrclk_o(lrclk)
  );

  i2s_rx u_rx (
    .clk(clk), .rst_n(rst_n), .bclk_i(bclk), .lrclk_i(lrclk), .sdata_i(codec_adc_i),
    .left_o(rx_left_o), .right_o(rx_right_o), .valid_o(rx_valid_o)
  );

  i2s_tx u_tx (
    .clk(clk), .rst_n(rst_n), .bclk_i(bclk), .lrclk_i(lrclk),
    .left_i(tx_left_i), .right_i(tx_right_i), .valid_i(tx_valid_i), .sdata_o(codec_dac_o)
  );

  delay_fx u_delay (
    .clk(clk), .rst_n(rst_n), .delaytime_i(dly_delaytime_i), .level_i(dly_level_i),
    .dry_i(dly_dry_i), .dry_valid_i(dly_dry_valid_i),
    .wet_o(dly_wet_o), .wet_valid_o(dly_wet_valid_o),
    .ram_wr_addr_o(dly_ram_wr_addr_o), .ram_wr_data_o(dly_ram_wr_data_o),
    .ram_wr_valid_o(dly_ram_wr_valid_o), .ram_rd_addr_o(dly_ram_rd_addr_o),
    .ram_rd_data_i(dly_ram_rd_data_i), .ram_rd_valid_i(dly_ram_rd_valid_i)
  );

  chorus u_chorus (
    .clk(clk), .rst_n(rst_n), .fixdelay_i(cho_fixdelay_i), .sweep_i(cho_sweep_i),
    .lfo_inc_i(cho_lfo_inc_i),
    .dry_i(cho_dry_i), .dry_valid_i(cho_dry_valid_i),
    .wet_o(cho_wet_o), .wet_valid_o(cho_wet_valid_o),
    .ram_wr_addr_o(cho_ram_wr_addr_o), .ram_wr_data_o(cho_ram_wr_data_o),
    .ram_wr_valid_o(cho_ram_wr_valid_o), .ram_rd_addr_o(cho_ram_rd_addr_o),
    .ram_rd_data_i(cho_ram_rd_data_i), .ram_rd_valid_i(cho_ram_rd_valid_i)
  );

  flanger u_flanger (
    .clk(clk), .rst_n(rst_n), .base_i(fla_base_i), .depth_i(fla_depth_i),
    .lfo_inc_i(fla_lfo_inc_i), .level_i(fla_level_i),
    .dry_i(fla_dry_i), .dry_valid_i(fla_dry_valid_i),
    .wet_o(fla_wet_o), .wet_valid_o(fla_wet_valid_o),
    .ram_wr_addr_o(fla_ram_wr_addr_o), .ram_wr_data_o(fla_ram_wr_data_o),
    .ram_wr_valid_o(fla_ram_wr_valid_o), .ram_rd_addr_o(fla_ram_rd_addr_o),
    .ram_rd_data_i(fla_ram_rd_data_i), .ram_rd_valid_i(fla_ram_rd_valid_i)
  );

  wahwah u_wahwah (
    .clk(clk), .rst_n(rst_n), .fc_idx_i(wah_fc_idx_i), .mode_i(wah_mode_i),
    .dry_i(wah_dry_i), .dry_valid_i(wah_dry_valid_i),
    .wet_o(wah_wet_o), .wet_valid_o(wah_wet_valid_o)
  );

  nlms_echo_canceller u_aec (
    .clk(clk), .rst_n(rst_n), .mu_i(aec_mu_i), .u_i(aec_u_i), .d_i(aec_d_i),
    .in_valid_i(aec_valid_i), .ready_o(aec_ready_o), .e_o(aec_e_o), .y_o(aec_y_o),
    .out_valid_o(aec_valid_o), .overrun_o(aec_overrun_o)
  );
endmodule
