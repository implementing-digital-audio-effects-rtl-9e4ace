// dds: direct digital synthesis sine oscillator, the low-frequency oscillator
// of the flanger.
//
// A PHASE_W-bit phase accumulator adds inc_i on every clock in which step_i
// is high (once per audio sample in the flanger), so the output frequency is
// f = inc_i * fs / 2^PHASE_W. The top LUT_AW phase bits index a look-up table
// of one full sine period; sin_o = round(AMP * sin(2*pi*k / 2^LUT_AW)) with
// AMP = 2^(OUT_W-1) - 1, as a signed integer. The table is computed during
// elaboration (a ROM, no runtime arithmetic). sin_o is a combinational read
// of the registered phase, so it is valid in the clock after step_i. Reset
// and clear_i return the phase to zero.
//
// The look-up-table DDS and its frequency parameter follow the original design; the
// table size, word widths and phase width are this design's choice.
module dds
  import dafx_pkg::*;
#(
  parameter int unsigned PHASE_W = 24,
  parameter int unsigned LUT_AW  = 8,
  parameter int unsigned OUT_W   = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear_i,
  input  logic                     step_i,
  input  logic [PHASE_W-1:0]       inc_i,
  output logic signed [OUT_W-1:0]  sin_o,
  output logic [PHASE_W-1:0]       phase_o
);
  localparam int unsigned DEPTH = 1 << LUT_AW;

  typedef logic signed [OUT_W-1:0] sample_t;
  typedef sample_t table_t [DEPTH];

  function automatic table_t make_table();
    table_t t;
    longint amp, quarter, r, theta, s;
    amp     = (longint'(1) <<< (OUT_W - 1)) - 1;
    quarter = longint'(DEPTH) / 4;
    for (int i = 0; i < DEPTH; i++) begin
      r     = longint'(i) % quarter;
      theta = (HALF_PI_Q30 * r) / quarter;
      case (i / (DEPTH / 4))
        0:       s =  sin_q30(theta);
        1:       s =  cos_q30(theta);
        2:       s = -sin_q30(theta);
        default: s = -cos_q30(theta);
      endcase
      s = (s * amp + (longint'(1) <<< 29)) >>> 30;
      if (s > amp)  s = amp;
      if (s < -amp) s = -amp;
      t[i] = sample_t'(s);
    end
    return t;
  endfunction

  localparam table_t SINE = make_table();

  logic [PHASE_W-1:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       phase <= '0;
    else if (clear_i) phase <= '0;
    else if (step_i)  phase <= phase + inc_i;
  end

  assign sin_o   = SINE[phase[PHASE_W-1 -: LUT_AW]];
  assign phase_o = phase;
endmodule
