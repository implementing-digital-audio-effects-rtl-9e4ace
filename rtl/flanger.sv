// flanger: the delay_fx structure (ring buffer in processor-managed SDRAM,
// output fed back through a level multiplier) with a read position that is
// swept by a sine from a DDS oscillator.
//
// Per dry sample x:
//     y = sat(x + m),   m = buffer[wp - D],   buffer[wp] <= sat(level * y)
//     D = base_i + (depth_i * (s + 2^15)) / 2^16
// where s is the signed 16-bit DDS sine (dds block), which advances by
// lfo_inc_i once per sample. D therefore sweeps sinusoidally between base_i
// and base_i + depth_i whole samples; no fractional interpolation is done.
// The ring holds 2^BUF_AW words (1024 = 23 ms at 44117 Hz by default);
// D must stay between 1 and 2^BUF_AW - 1.
//
// Processor-side protocol as in delay_fx: ram_rd_addr_o is the word needed
// for the next sample and changes only in the clock after wet_valid_o; dry
// and read data may arrive in either order; wet and the write follow in the
// clock after the later one.
//
// The DDS-modulated addressing added to the linear ring addressing, the
// feedback through a level multiplier and whole-sample delay steps follow
// the original design; the buffer size and the base/depth parameters are this
// design's choice.
module flanger
  import dafx_pkg::*;
#(
  parameter int unsigned BUF_AW = 10,
  parameter int unsigned PH_W   = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  // parameter settings
  input  logic [BUF_AW-1:0] base_i,
  input  logic [BUF_AW-1:0] depth_i,
  input  logic [PH_W-1:0]   lfo_inc_i,
  input  audio_t            level_i,
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
  logic signed [15:0]          sine;
  logic [15:0]                 sine_u;
  logic [BUF_AW+15:0]          mod_prod;
  logic [BUF_AW-1:0]           wp, delay_c, rd_c;
  audio_t                      x_q, m_q, x_c, m_c, y_c, fb_c;
  logic signed [2*AUDIO_W-1:0] prod_c;
  logic                        have_x, have_m;

  wire go = (have_x || dry_valid_i) && (have_m || ram_rd_valid_i);

  dds #(.PHASE_W(PH_W), .LUT_AW(8), .OUT_W(16)) u_dds (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear_i (1'b0),
    .step_i  (go),
    .inc_i   (lfo_inc_i),
    .sin_o   (sine),
    .phase_o ()
  );

  always_comb begin
    sine_u   = {~sine[15], sine[14:0]};   // offset binary: s + 2^15
    mod_prod = depth_i * sine_u;
    delay_c  = base_i + mod_prod[BUF_AW+15 -: BUF_AW];
    rd_c     = wp - delay_c;
    x_c      = have_x ? x_q : dry_i;
    m_c      = have_m ? m_q : ram_rd_data_i;
    y_c      = sat_audio(64'(x_c) + 64'(m_c));
    prod_c   = y_c * level_i;
    fb_c     = sat_audio(64'(prod_c >>> (AUDIO_W - 1)));
  end

  assign ram_rd_addr_o = ram_addr_t'(rd_c);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp             <= '0;
      x_q            <= '0;
      m_q            <= '0;
      have_x         <= 1'b0;
      have_m         <= 1'b0;
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
        have_m         <= 1'b0;
        wet_o          <= y_c;
        wet_valid_o    <= 1'b1;
        ram_wr_addr_o  <= ram_addr_t'(wp);
        ram_wr_data_o  <= fb_c;
        ram_wr_valid_o <= 1'b1;
        wp             <= wp + 1'b1;
      end else begin
        if (dry_valid_i) begin
          x_q    <= dry_i;
          have_x <= 1'b1;
        end
        if (ram_rd_valid_i) begin
          m_q    <= ram_rd_data_i;
          have_m <= 1'b1;
        end
      end
    end
  end
endmodule
