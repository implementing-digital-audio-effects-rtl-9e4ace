// wahwah: time-varying band-pass (or band-reject) filter built from a
// second-order allpass.
//
// The allpass
//     A(z) = (-c + k z^-1 + z^-2) / (1 + k z^-1 - c z^-2),   k = d (1 - c)
//     c = (tan(pi fb/fs) - 1) / (tan(pi fb/fs) + 1),  d = -cos(2 pi fc/fs)
// shifts the phase by 180 degrees at the centre frequency fc. Combining it
// with the input gives
//     band-pass   (mode_i = 0): y = (x - a) / 2
//     band-reject (mode_i = 1): y = (x + a) / 2
// The numerator mirrors the denominator, so only c and k are needed and the
// difference equation
//     a[n] = -c x[n] + k x[n-1] + x[n-2] - k a[n-1] + c a[n-2]
// takes four multiplications, done in parallel. The bandwidth fb is fixed
// (parameter FB_HZ), so c is a constant; k depends on fc and is read from a
// ROM of ROM_DEPTH 24-bit words covering fc = F_MIN_HZ .. F_MAX_HZ linearly:
//     fc(i) = F_MIN_HZ + i (F_MAX_HZ - F_MIN_HZ) / (ROM_DEPTH - 1).
// The ROM is computed during elaboration. fc_idx_i selects the entry and may
// change at any time (pedal or mouse); the ROM read is registered, so a new
// index takes effect from the sample after next clock.
//
// Formats: audio Q1.23, c and k Q2.22, allpass state Q3.23 (two guard bits,
// saturating), output saturated to Q1.23.
// Timing: wet_o/wet_valid_o follow dry_valid_i by one clock; one sample may
// be accepted per clock.
//
// The allpass method, the equations, the 1/2 output gain, the four parallel
// multipliers and the 1024 x 24-bit ROM over 200 Hz - 2 kHz follow the
// original design; FB_HZ = 800 is taken from its example plot, and the number
// formats are this design's choice.
module wahwah
  import dafx_pkg::*;
#(
  parameter int unsigned FS           = FS_HZ,
  parameter int unsigned FB_HZ        = 800,
  parameter int unsigned F_MIN_HZ     = 200,
  parameter int unsigned F_MAX_HZ     = 2000,
  parameter int unsigned ROM_DEPTH    = 1024,
  parameter int unsigned COEF_W       = 24,
  localparam int unsigned IDX_W       = $clog2(ROM_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // parameter settings
  input  logic [IDX_W-1:0] fc_idx_i,
  input  logic             mode_i,      // 0: band-pass, 1: band-reject
  // audio
  input  audio_t           dry_i,
  input  logic             dry_valid_i,
  output audio_t           wet_o,
  output logic             wet_valid_o
);
  localparam int unsigned CF = COEF_W - 2;   // coefficient fraction bits

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t rom_t [ROM_DEPTH];

  localparam longint C_Q30 = allpass_c_q30(longint'(FB_HZ), longint'(FS));
  localparam coef_t  C_COEF = coef_t'((C_Q30 + (longint'(1) <<< (29 - CF))) >>> (30 - CF));

  function automatic rom_t make_rom();
    rom_t   r;
    longint num, theta, d, k;
    for (int i = 0; i < ROM_DEPTH; i++) begin
      num   = longint'(F_MIN_HZ) * (longint'(ROM_DEPTH) - 1)
            + longint'(i) * (longint'(F_MAX_HZ) - longint'(F_MIN_HZ));
      theta = (2 * PI_Q30 * num) / ((longint'(ROM_DEPTH) - 1) * longint'(FS));
      d     = -cos_q30(theta);
      k     = (d * (ONE_Q30 - C_Q30)) >>> 30;
      r[i]  = coef_t'((k + (longint'(1) <<< (29 - CF))) >>> (30 - CF));
    end
    return r;
  endfunction

  localparam rom_t K_ROM = make_rom();

  // allpass state with two guard bits: its output can exceed full scale
  typedef logic signed [AUDIO_W+1:0] state_t;
  localparam longint S_MAX = (longint'(1) <<< (AUDIO_W + 1)) - 1;

  function automatic state_t sat_state(input logic signed [63:0] v);
    if (v > S_MAX)       return state_t'(S_MAX);
    else if (v < -S_MAX) return state_t'(-S_MAX);
    else                 return state_t'(v);
  endfunction

  coef_t  k_q;
  audio_t x1, x2;
  state_t a1, a2, a_c;
  logic signed [63:0] acc_c, out_c;

  // coefficient ROM, registered read
  always_ff @(posedge clk) k_q <= K_ROM[fc_idx_i];

  always_comb begin
    acc_c = - 64'(C_COEF) * 64'(dry_i)
            + 64'(k_q)    * 64'(x1)
            + (64'(x2) <<< CF)
            - 64'(k_q)    * 64'(a1)
            + 64'(C_COEF) * 64'(a2);
    a_c   = sat_state(acc_c >>> CF);
    out_c = mode_i ? (64'(dry_i) + 64'(a_c)) : (64'(dry_i) - 64'(a_c));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1          <= '0;
      x2          <= '0;
      a1          <= '0;
      a2          <= '0;
      wet_o       <= '0;
      wet_valid_o <= 1'b0;
    end else begin
      wet_valid_o <= dry_valid_i;
      if (dry_valid_i) begin
        x1    <= dry_i;
        x2    <= x1;
        a1    <= a_c;
        a2    <= a1;
        wet_o <= sat_audio(out_c >>> 1);
      end
    end
  end
endmodule
