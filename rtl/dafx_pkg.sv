// dafx_pkg: types, constants and elaboration-time math shared by the audio
// effect units.
//
// Audio samples are 24-bit two's complement fractions (Q1.23), the word width
// the codec delivers and the width of the processor-facing data ports. The
// effect units that buffer audio in processor-managed memory use a relative
// word address of RAM_AW bits; 22 bits cover the 16 MB SDRAM in 32-bit words
// (the width is this design's choice, the memory size follows the board).
//
// The constant functions below (fixed-point sine/cosine by Taylor series in
// Q2.30) are only evaluated during elaboration to fill look-up tables; they
// produce no hardware of their own.
package dafx_pkg;

  localparam int unsigned AUDIO_W = 24;
  localparam int unsigned RAM_AW  = 22;
  localparam int unsigned CLK_HZ  = 48_000_000;
  // Codec frame rate obtained from the 48 MHz system clock: 48 MHz / 1088.
  localparam int unsigned FS_HZ   = 44_117;

  typedef logic signed [AUDIO_W-1:0] audio_t;
  typedef logic        [RAM_AW-1:0]  ram_addr_t;

  localparam audio_t AUDIO_MAX = audio_t'({1'b0, {(AUDIO_W-1){1'b1}}});
  localparam audio_t AUDIO_MIN = audio_t'({1'b1, {(AUDIO_W-1){1'b0}}});

  // Saturate a wide signed value to the audio range.
  function automatic audio_t sat_audio(input logic signed [63:0] v);
    if (v > 64'(signed'(AUDIO_MAX)))      return AUDIO_MAX;
    else if (v < 64'(signed'(AUDIO_MIN))) return AUDIO_MIN;
    else                                  return audio_t'(v);
  endfunction

  // ---------------------------------------------------------------------
  // Elaboration-time fixed-point trigonometry, angles and results in Q2.30.
  // ---------------------------------------------------------------------
  localparam longint ONE_Q30     = 64'sd1073741824;
  localparam longint PI_Q30      = 64'sd3373259426;   // pi * 2^30
  localparam longint HALF_PI_Q30 = 64'sd1686629713;

  // sin(x) for |x| <= pi/2, Taylor series to x^15.
  function automatic longint sin_q30(input longint x);
    longint x2, term, sum;
    x2   = (x * x) >>> 30;
    term = x;
    sum  = x;
    for (int k = 1; k <= 7; k++) begin
      term = -((term * x2) >>> 30) / longint'((2*k) * (2*k + 1));
      sum  = sum + term;
    end
    return sum;
  endfunction

  // cos(x) for |x| <= pi/2, Taylor series to x^16.
  function automatic longint cos_q30(input longint x);
    longint x2, term, sum;
    x2   = (x * x) >>> 30;
    term = ONE_Q30;
    sum  = ONE_Q30;
    for (int k = 1; k <= 8; k++) begin
      term = -((term * x2) >>> 30) / longint'((2*k - 1) * (2*k));
      sum  = sum + term;
    end
    return sum;
  endfunction

  // Allpass bandwidth coefficient c = (tan(pi fb/fs) - 1) / (tan(pi fb/fs) + 1),
  // returned in Q2.30.
  function automatic longint allpass_c_q30(input longint fb_hz, input longint fs_hz);
    longint phi, t;
    phi = (PI_Q30 * fb_hz) / fs_hz;
    t   = (sin_q30(phi) <<< 30) / cos_q30(phi);
    return ((t - ONE_Q30) <<< 30) / (t + ONE_Q30);
  endfunction

endpackage
