// delay_fx: echo / slapback delay with feedback, its audio buffer held in the
// processor-managed SDRAM.
//
// Every dry sample x produces one wet sample
//     y = sat(x + m),   m = buffer[ptr],   buffer[ptr] <= sat(level * y)
// so the output is the input plus a level-scaled copy of the output from
// delaytime samples earlier (a recirculating echo). ptr steps through the
// ring buffer 0 .. delaytime-1 and wraps, so delaytime sets the ring size and
// the delay in samples (0 acts as 1). The same unit serves as slapback
// (10-25 ms) or echo (> 50 ms); which one is only a matter of the delaytime
// the processor writes.
//
// Processor-side protocol (all single-clock pulses unless noted):
//   ram_rd_addr_o  always shows the relative address of the word needed for
//                  the next sample; it changes only in the clock after
//                  wet_valid_o.
//   ram_rd_data_i / ram_rd_valid_i  the processor returns that word.
//   dry_i / dry_valid_i             the next input sample.
// Both may come in either order. In the clock after the later of the two,
// wet_o/wet_valid_o and ram_wr_addr_o/ram_wr_data_o/ram_wr_valid_o are
// presented together; the processor stores the word in SDRAM.
// level_i is Q1.23 (negative values invert the echo).
//
// The ring-buffer addressing, the delaytime and level parameters and the
// feedback structure follow the original design; the handshake order, widths and
// the saturation are this design's choices.
module delay_fx
  import dafx_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // parameter settings
  input  ram_addr_t delaytime_i,
  input  audio_t    level_i,
  // audio
  input  audio_t    dry_i,
  input  logic      dry_valid_i,
  output audio_t    wet_o,
  output logic      wet_valid_o,
  // effect memory
  output ram_addr_t ram_wr_addr_o,
  output audio_t    ram_wr_data_o,
  output logic      ram_wr_valid_o,
  output ram_addr_t ram_rd_addr_o,
  input  audio_t    ram_rd_data_i,
  input  logic      ram_rd_valid_i
);
  ram_addr_t ptr;
  audio_t    x_q, m_q;
  logic      have_x, have_m;
  audio_t    y_c, fb_c;
  logic signed [2*AUDIO_W-1:0] prod_c;

  wire    go = (have_x || dry_valid_i) && (have_m || ram_rd_valid_i);
  audio_t x_c, m_c;

  always_comb begin
    x_c    = have_x ? x_q : dry_i;
    m_c    = have_m ? m_q : ram_rd_data_i;
    y_c    = sat_audio(64'(x_c) + 64'(m_c));
    prod_c = y_c * level_i;
    fb_c   = sat_audio(64'(prod_c >>> (AUDIO_W - 1)));
  end

  assign ram_rd_addr_o = ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr            <= '0;
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
        ram_wr_addr_o  <= ptr;
        ram_wr_data_o  <= fb_c;
        ram_wr_valid_o <= 1'b1;
        ptr            <= (ptr + 1'b1 >= delaytime_i) ? '0 : ptr + 1'b1;
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
