// tb_dafx_top: end-to-end testbench of the whole effects hardware at its
// default sizes (1300-tap echo canceller, 1024-entry wah-wah table, 48 MHz
// clock and 44117 Hz codec frames).
//
// The testbench plays the codec and the processor software:
//   - a codec model sends stereo samples over I2S using the design's own
//     bit and word clocks and decodes the I2S data coming back;
//   - for every received sample the "software" routes the left channel
//     through delay -> wah-wah and the right channel through the two-voice
//     chorus -> flanger, serves every effect's memory requests from its own SDRAM
//     arrays, sends the two results back to the codec, and feeds the echo
//     canceller with u = left (far end) and d = right (the left signal after
//     a three-reflection echo path);
//   - every output is compared with the testbench's own models: ring-buffer
//     models for delay, chorus and flanger (triangle and floating-point sine
//     LFOs), a floating-point allpass for the wah-wah, a bit-exact NLMS model
//     for the echo canceller, and the samples themselves for the I2S path.
// The software sweeps the wah-wah centre frequency like a pedal and switches
// it from band-pass to band-reject, and once offers the echo canceller a
// sample while it is busy. Each mechanism is counted and must happen:
// I2S frames in and out, delay ring wrap, chorus triangle turn, flanger sweep
// to both ends, wah-wah coefficient change and mode switch, echo-canceller
// adaptation (residual echo energy falls) and overrun.
module tb_dafx_top;
  import dafx_pkg::*;

  localparam int NFRAMES = 4700;
  localparam int TAPS    = 1300;
  localparam longint DELTA = 64'sd68719476736;
  localparam real PI = 3.14159265358979;
  localparam real FS = 44117.0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;   // stands for the 48 MHz system clock

  logic        mclk, bclk, lrclk, adc, dac;
  audio_t      rx_l, rx_r, tx_l, tx_r;
  logic        rx_valid, tx_valid;
  ram_addr_t   dly_time, dly_wa, dly_ra, cho_wa, cho_ra, fla_wa, fla_ra;
  audio_t      dly_level, dly_dry, dly_wet, dly_wd, dly_rd;
  logic        dly_dv, dly_wv, dly_wrv, dly_rdv;
  logic [10:0] cho_fix, cho_sweep;
  logic [23:0] cho_inc, fla_inc, mu;
  audio_t      cho_dry, cho_wet, cho_wd, cho_rd;
  logic        cho_dv, cho_wv, cho_wrv, cho_rdv;
  logic [9:0]  fla_base, fla_depth, wah_idx;
  audio_t      fla_level, fla_dry, fla_wet, fla_wd, fla_rd;
  logic        fla_dv, fla_wv, fla_wrv, fla_rdv;
  logic        wah_mode, wah_dv, wah_wv;
  audio_t      wah_dry, wah_wet;
  audio_t      aec_u, aec_d, aec_e, aec_y;
  logic        aec_v, aec_ready, aec_ov, aec_overrun;

  dafx_top dut (
    .clk(clk), .rst_n(rst_n),
    .codec_mclk_o(mclk), .codec_bclk_o(bclk), .codec_lrclk_o(lrclk),
    .codec_adc_i(adc), .codec_dac_o(dac),
    .rx_left_o(rx_l), .rx_right_o(rx_r), .rx_valid_o(rx_valid),
    .tx_left_i(tx_l), .tx_right_i(tx_r), .tx_valid_i(tx_valid),
    .dly_delaytime_i(dly_time), .dly_level_i(dly_level), .dly_dry_i(dly_dry),
    .dly_dry_valid_i(dly_dv), .dly_wet_o(dly_wet), .dly_wet_valid_o(dly_wv),
    .dly_ram_wr_addr_o(dly_wa), .dly_ram_wr_data_o(dly_wd), .dly_ram_wr_valid_o(dly_wrv),
    .dly_ram_rd_addr_o(dly_ra), .dly_ram_rd_data_i(dly_rd), .dly_ram_rd_valid_i(dly_rdv),
    .cho_fixdelay_i(cho_fix), .cho_sweep_i(cho_sweep), .cho_lfo_inc_i(cho_inc),
    .cho_dry_i(cho_dry), .cho_dry_valid_i(cho_dv), .cho_wet_o(cho_wet), .cho_wet_valid_o(cho_wv),
    .cho_ram_wr_addr_o(cho_wa), .cho_ram_wr_data_o(cho_wd), .cho_ram_wr_valid_o(cho_wrv),
    .cho_ram_rd_addr_o(cho_ra), .cho_ram_rd_data_i(cho_rd), .cho_ram_rd_valid_i(cho_rdv),
    .fla_base_i(fla_base), .fla_depth_i(fla_depth), .fla_lfo_inc_i(fla_inc), .fla_level_i(fla_level),
    .fla_dry_i(fla_dry), .fla_dry_valid_i(fla_dv), .fla_wet_o(fla_wet), .fla_wet_valid_o(fla_wv),
    .fla_ram_wr_addr_o(fla_wa), .fla_ram_wr_data_o(fla_wd), .fla_ram_wr_valid_o(fla_wrv),
    .fla_ram_rd_addr_o(fla_ra), .fla_ram_rd_data_i(fla_rd), .fla_ram_rd_valid_i(fla_rdv),
    .wah_fc_idx_i(wah_idx), .wah_mode_i(wah_mode), .wah_dry_i(wah_dry), .wah_dry_valid_i(wah_dv),
    .wah_wet_o(wah_wet), .wah_wet_valid_o(wah_wv),
    .aec_mu_i(mu), .aec_u_i(aec_u), .aec_d_i(aec_d), .aec_valid_i(aec_v),
    .aec_ready_o(aec_ready), .aec_e_o(aec_e), .aec_y_o(aec_y), .aec_valid_o(aec_ov),
    .aec_overrun_o(aec_overrun)
  );

  int checks = 0, failures = 0, nbad = 0;
  int n_rx = 0, n_dac = 0, n_dly_wrap = 0, n_cho_turn = 0, n_fla_min = 0, n_fla_max = 0;
  int n_wah_idx = 0, n_wah_mode = 0, n_aec = 0, n_overrun = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (nbad++ < 30) $display("FAIL %s", what);
    end
  endtask

  function automatic longint satw(input longint v, input int bits);
    longint mx = (longint'(1) <<< (bits - 1)) - 1;
    if (v > mx) return mx;
    if (v < -mx - 1) return -mx - 1;
    return v;
  endfunction

  // ---------------- codec model ----------------
  logic [23:0] adc_l [NFRAMES + 8];
  logic [23:0] adc_r [NFRAMES + 8];
  logic [47:0] tx_q [$];
  logic [47:0] last_dac;
  int          adc_frame = 0;

  initial begin
    logic        pb, pl;
    int          slot, ch;
    logic [23:0] word, got [2];
    // after reset the design starts in bit slot 0 of a left word
    pb = 0; pl = 0; slot = 0; ch = 0; word = '0; adc = 0; last_dac = '0;
    forever begin
      @(negedge clk);
      if (pb && !bclk) begin
        if (lrclk != pl) begin
          slot = 0;
          ch   = int'(lrclk);
          if (!lrclk) adc_frame++;
        end else slot++;
        word = ch[0] ? adc_r[adc_frame] : adc_l[adc_frame];
        adc = (slot >= 1 && slot <= 24) ? word[24 - slot] : 1'b0;
      end
      if (!pb && bclk && slot >= 1 && slot <= 24) begin
        got[ch][24 - slot] = dac;
        if (slot == 24 && ch == 1) begin
          if (tx_q.size() > 0 && {got[0], got[1]} == tx_q[0]) begin
            last_dac = tx_q.pop_front();
            n_dac++;
          end else begin
            check({got[0], got[1]} == last_dac, "DAC frame is the last sample sent or a repeat");
          end
        end
      end
      pb = bclk; pl = lrclk;
    end
  end

  // ---------------- effect models ----------------
  audio_t sd_dly [8192];  audio_t m_dly [8192];  int p_dly = 0;
  audio_t sd_cho [2048];  audio_t h_cho [2048];  int w_cho = 0; longint ph_cho = 0;
  int prev_cd = -1, dir_cd = 0;
  audio_t sd_fla [1024];  audio_t m_fla [1024];  int w_fla = 0; longint ph_fla = 0;
  real wx1 = 0, wx2 = 0, wa1 = 0, wa2 = 0;
  longint xs [TAPS];
  longint w  [TAPS];
  longint norm = 0;
  real e_early = 0, e_late = 0, d_late = 0;

  task automatic nlms_model(input audio_t un, input audio_t dn, output longint ym, output longint em);
    longint acc, num, q;
    logic [127:0] quot;
    norm = norm + longint'(un) * longint'(un) - xs[TAPS-1] * xs[TAPS-1];
    for (int k = TAPS - 1; k > 0; k--) xs[k] = xs[k-1];
    xs[0] = longint'(un);
    acc = 0;
    for (int k = 0; k < TAPS; k++) acc += (w[k] * xs[k]) >>> 30;
    ym   = satw(acc, 24);
    em   = satw(longint'(dn) - ym, 24);
    num  = longint'(mu) * em;
    quot = (128'((num < 0) ? -num : num) << 30) / 128'(norm + DELTA);
    q    = (quot > 128'((longint'(1) <<< 39) - 1)) ? (longint'(1) <<< 39) - 1 : longint'(quot);
    if (num < 0) q = -q;
    for (int k = 0; k < TAPS; k++) w[k] = satw(w[k] + ((q * xs[k]) >>> 23), 32);
  endtask

  // one pass through a RAM-based effect: read data first, then the dry sample
  task automatic ram_fx_delay(input audio_t x, output audio_t yout);
    audio_t ey, efb;
    check(dly_ra == ram_addr_t'(p_dly), "delay read address");
    ey  = audio_t'(satw(longint'(x) + longint'(m_dly[p_dly]), 24));
    efb = audio_t'(satw((longint'(ey) * longint'(dly_level)) >>> 23, 24));
    dly_rd = sd_dly[dly_ra[12:0]]; dly_rdv = 1; @(negedge clk); dly_rdv = 0;
    dly_dry = x; dly_dv = 1; @(negedge clk); dly_dv = 0;
    check(dly_wv && dly_wet == ey, $sformatf("delay wet %0d exp %0d", dly_wet, ey));
    check(dly_wrv && dly_wa == ram_addr_t'(p_dly) && dly_wd == efb, "delay write");
    sd_dly[dly_wa[12:0]] = dly_wd;
    m_dly[p_dly] = efb;
    p_dly = (p_dly + 1 >= int'(dly_time)) ? 0 : p_dly + 1;
    if (p_dly == 0) n_dly_wrap++;
    yout = dly_wet;
  endtask

  // two chorus voices, their triangles half an LFO period apart, each read
  // from the effect memory in turn
  task automatic ram_fx_chorus(input audio_t x, output audio_t yout);
    longint ph, tv, sum;
    int     d, rd;
    audio_t ey;
    sum = longint'(x);
    for (int v = 0; v < 2; v++) begin
      ph = (ph_cho + longint'(v) * 64'h800000) & 64'hFFFFFF;
      tv = (ph >= 64'h800000) ? 64'hFFFFFF - ph : ph;
      d  = int'(cho_fix) + int'((longint'(cho_sweep) * tv) >>> 23);
      rd = (w_cho - d) & 2047;
      if (v == 0) begin
        if (prev_cd >= 0 && d != prev_cd) begin
          if (dir_cd != 0 && ((d > prev_cd) ? 1 : -1) != dir_cd) n_cho_turn++;
          dir_cd = (d > prev_cd) ? 1 : -1;
        end
        prev_cd = d;
      end
      check(cho_ra == ram_addr_t'(rd), $sformatf("chorus voice %0d read address", v));
      sum += longint'(h_cho[rd]);
      cho_rd = sd_cho[cho_ra[10:0]]; cho_rdv = 1; @(negedge clk); cho_rdv = 0;
    end
    ey = audio_t'(satw(sum, 24));
    cho_dry = x; cho_dv = 1; @(negedge clk); cho_dv = 0;
    check(cho_wv && cho_wet == ey, $sformatf("chorus wet %0d exp %0d", cho_wet, ey));
    check(cho_wrv && cho_wa == ram_addr_t'(w_cho) && cho_wd == x, "chorus write");
    sd_cho[cho_wa[10:0]] = cho_wd;
    h_cho[w_cho] = x;
    w_cho = (w_cho + 1) & 2047;
    ph_cho += longint'(cho_inc);
    yout = cho_wet;
  endtask

  task automatic ram_fx_flanger(input audio_t x, output audio_t yout);
    real    a;
    int     s, ok, rd, dmin;
    audio_t ey, efb;
    a  = 2.0 * PI * real'((ph_fla & 64'hFFFFFF) >> 16) / 256.0;
    s  = $rtoi(32767.0 * $sin(a) + (($sin(a) >= 0) ? 0.5 : -0.5));
    ok = 0;
    for (int e = -1; e <= 1; e++) begin
      dmin = int'(fla_base) + int'((longint'(fla_depth) * longint'(s + e + 32768)) >>> 16);
      if (fla_ra == ram_addr_t'((w_fla - dmin) & 1023)) ok = 1;
    end
    check(ok == 1, "flanger read address");
    dmin = int'(fla_base) + int'((longint'(fla_depth) * longint'(s + 32768)) >>> 16);
    if (dmin == int'(fla_base)) n_fla_min++;
    if (dmin >= int'(fla_base) + int'(fla_depth) - 1) n_fla_max++;
    rd  = int'(fla_ra[9:0]);
    ey  = audio_t'(satw(longint'(x) + longint'(m_fla[rd]), 24));
    efb = audio_t'(satw((longint'(ey) * longint'(fla_level)) >>> 23, 24));
    fla_rd = sd_fla[rd]; fla_rdv = 1; @(negedge clk); fla_rdv = 0;
    fla_dry = x; fla_dv = 1; @(negedge clk); fla_dv = 0;
    check(fla_wv && fla_wet == ey, $sformatf("flanger wet %0d exp %0d", fla_wet, ey));
    check(fla_wrv && fla_wa == ram_addr_t'(w_fla) && fla_wd == efb, "flanger write");
    sd_fla[fla_wa[9:0]] = fla_wd;
    m_fla[w_fla] = efb;
    w_fla = (w_fla + 1) & 1023;
    ph_fla += longint'(fla_inc);
    yout = fla_wet;
  endtask

  task automatic wah(input audio_t xq, output audio_t yout);
    real t, c, d, k, x, a, y, ym, err;
    t = $tan(PI * 800.0 / FS);
    c = (t - 1.0) / (t + 1.0);
    d = -$cos(2.0 * PI * (200.0 + real'(wah_idx) * 1800.0 / 1023.0) / FS);
    k = d * (1.0 - c);
    x = real'(xq) / 8388608.0;
    a = -c * x + k * wx1 + wx2 - k * wa1 + c * wa2;
    y = wah_mode ? (x + a) / 2.0 : (x - a) / 2.0;
    wx2 = wx1; wx1 = x; wa2 = wa1; wa1 = a;
    wah_dry = xq; wah_dv = 1; @(negedge clk); wah_dv = 0;
    ym  = real'(wah_wet) / 8388608.0;
    err = (ym > y) ? ym - y : y - ym;
    check(wah_wv && err < 1.0 / 4096.0, $sformatf("wahwah %f exp %f", ym, y));
    yout = wah_wet;
  endtask

  initial begin
    repeat (NFRAMES * 1088 + 200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    audio_t hist [16];
    audio_t l, r, dw, ww, cw, fw;
    longint ym, em;
    for (int i = 0; i < 8192; i++) begin sd_dly[i] = '0; m_dly[i] = '0; end
    for (int i = 0; i < 2048; i++) begin sd_cho[i] = '0; h_cho[i] = '0; end
    for (int i = 0; i < 1024; i++) begin sd_fla[i] = '0; m_fla[i] = '0; end
    for (int k = 0; k < TAPS; k++) begin xs[k] = 0; w[k] = 0; end
    for (int k = 0; k < 16; k++) hist[k] = '0;
    // codec input: left = far-end noise, right = its echo
    for (int f = 0; f < NFRAMES + 8; f++) begin
      for (int k = 15; k > 0; k--) hist[k] = hist[k-1];
      hist[0]  = audio_t'($signed($urandom_range(0, 2000000)) - 1000000);
      adc_l[f] = hist[0];
      adc_r[f] = 24'((longint'(hist[3]) * 4194304 - longint'(hist[7]) * 2516582
                     + longint'(hist[12]) * 1677722) >>> 23);
    end
    tx_l = '0; tx_r = '0; tx_valid = 0;
    dly_time = 22'd2206;  dly_level = 24'sd4194304;          // 50 ms echo, 0.5
    dly_dry = '0; dly_dv = 0; dly_rd = '0; dly_rdv = 0;
    cho_fix = 11'd662; cho_sweep = 11'd265; cho_inc = 24'd1901; // 15 ms + 6 ms at 5 Hz
    cho_dry = '0; cho_dv = 0; cho_rd = '0; cho_rdv = 0;
    fla_base = 10'd10; fla_depth = 10'd300; fla_inc = 24'd3803; // 10 Hz
    fla_level = 24'sd5033165;                                 // 0.6
    fla_dry = '0; fla_dv = 0; fla_rd = '0; fla_rdv = 0;
    wah_idx = 10'd100; wah_mode = 0; wah_dry = '0; wah_dv = 0;
    mu = 24'd4194304; aec_u = '0; aec_d = '0; aec_v = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    while (n_rx < NFRAMES - 4) begin
      @(negedge clk);
      if (!rx_valid) continue;
      l = rx_l; r = rx_r;
      check(rx_l == adc_l[adc_frame] && rx_r == adc_r[adc_frame], $sformatf("I2S input sample %0d: %h %h exp %h %h", n_rx, rx_l, rx_r, adc_l[adc_frame], adc_r[adc_frame]));
      n_rx++;
      // echo canceller runs in parallel with the other effects
      aec_u = l; aec_d = r;
      check(aec_ready, "echo canceller ready for the next sample");
      aec_v = 1; @(negedge clk); aec_v = 0;
      nlms_model(l, r, ym, em);
      if (n_rx == 50) begin
        aec_v = 1; @(negedge clk); aec_v = 0;
        check(aec_overrun, "overrun flagged for a sample offered while busy");
        if (aec_overrun) n_overrun++;
      end
      // pedal: sweep the wah-wah centre frequency, switch the mode once
      if (n_rx % 400 == 0) begin wah_idx = 10'((int'(wah_idx) + 211) % 1024); n_wah_idx++; end
      if (n_rx == 3000) begin wah_mode = 1; n_wah_mode++; end
      ram_fx_delay(l, dw);
      wah(dw, ww);
      ram_fx_chorus(r, cw);
      ram_fx_flanger(cw, fw);
      tx_l = ww; tx_r = fw; tx_valid = 1; @(negedge clk); tx_valid = 0;
      tx_q.push_back({ww, fw});
      while (!aec_ov) @(negedge clk);
      check(aec_y == audio_t'(ym) && aec_e == audio_t'(em),
            $sformatf("echo canceller y %0d exp %0d e %0d exp %0d", aec_y, ym, aec_e, em));
      n_aec++;
      if (n_rx <= 200) e_early += real'(aec_e) * real'(aec_e);
      if (n_rx > NFRAMES - 204) begin
        e_late += real'(aec_e) * real'(aec_e);
        d_late += real'(r) * real'(r);
      end
    end
    repeat (3000) @(negedge clk);
    check(n_dac >= n_rx - 2, $sformatf("%0d of %0d samples came back over I2S", n_dac, n_rx));
    check(n_dly_wrap >= 2,  "delay ring wrapped");
    check(n_cho_turn >= 1,  "chorus triangle turned");
    check(n_fla_min > 0 && n_fla_max > 0, "flanger swept to both ends");
    check(n_wah_idx >= 5 && n_wah_mode == 1, "wah-wah centre frequency and mode changed");
    check(n_aec == n_rx && e_late < 0.05 * d_late, $sformatf("echo reduced to %f", e_late / d_late));
    check(n_overrun == 1, "echo canceller overrun seen");
    $display("frames in %0d out %0d, delay wraps %0d, chorus turns %0d, flanger min/max %0d/%0d",
             n_rx, n_dac, n_dly_wrap, n_cho_turn, n_fla_min, n_fla_max);
    $display("wah index changes %0d mode switches %0d, aec samples %0d overruns %0d residual %f",
             n_wah_idx, n_wah_mode, n_aec, n_overrun, e_late / d_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
