// tb_wahwah: self-checking testbench of the wah-wah filter.
// An independent floating-point model (coefficients c and d computed with
// tan() and cos() from fb = 800 Hz, fs = 44117 Hz and the centre frequency of
// the selected table entry) runs the same allpass difference equation; every
// output sample must match it to within 2^-12 of full scale. The run covers
// band-pass and band-reject mode, several centre-frequency indices (the
// coefficient changes while audio runs), a sine at the centre frequency
// (band-pass passes it at full gain, band-reject removes it) and the
// one-clock latency; a loud noise burst drives the output into saturation.
module tb_wahwah;
  import dafx_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [9:0] idx;
  logic       mode, dry_valid, wet_valid;
  audio_t     dry, wet;

  wahwah dut (.clk(clk), .rst_n(rst_n), .fc_idx_i(idx), .mode_i(mode),
              .dry_i(dry), .dry_valid_i(dry_valid), .wet_o(wet), .wet_valid_o(wet_valid));

  localparam real PI = 3.14159265358979;
  localparam real FS = 44117.0;

  int  checks = 0, failures = 0, mode_switches = 0, idx_changes = 0, clips = 0;
  real x1, x2, a1, a2, maxerr;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic real fc_of(input int i);
    return 200.0 + real'(i) * 1800.0 / 1023.0;
  endfunction

  // runs n samples of a sine (or noise if f == 0); returns peak |y| of the
  // last half
  task automatic run(input int i, input bit m, input real f, input real amp, input int n, output real peak);
    real t, c, d, k, x, a, y, ym, err;
    audio_t xq;
    if (i != int'(idx)) idx_changes++;
    if (m != mode) mode_switches++;
    idx = 10'(i); mode = m;
    @(negedge clk); @(negedge clk);     // let the registered ROM read settle
    t = $tan(PI * 800.0 / FS);
    c = (t - 1.0) / (t + 1.0);
    d = -$cos(2.0 * PI * fc_of(i) / FS);
    k = d * (1.0 - c);
    peak = 0.0;
    for (int s = 0; s < n; s++) begin
      if (f > 0.0) x = amp * $sin(2.0 * PI * f * real'(s) / FS);
      else         x = amp * (real'($urandom_range(0, 2000000)) / 1000000.0 - 1.0);
      xq = audio_t'($rtoi(x * 8388608.0));
      x  = real'(xq) / 8388608.0;
      a  = -c * x + k * x1 + x2 - k * a1 + c * a2;
      y  = m ? (x + a) / 2.0 : (x - a) / 2.0;
      if (y > 8388607.0 / 8388608.0) begin y = 8388607.0 / 8388608.0; clips++; end
      if (y < -1.0) begin y = -1.0; clips++; end
      x2 = x1; x1 = x; a2 = a1; a1 = a;
      dry = xq; dry_valid = 1; @(negedge clk); dry_valid = 0;
      ym  = real'(wet) / 8388608.0;
      err = (ym > y) ? ym - y : y - ym;
      if (err > maxerr) maxerr = err;
      check(wet_valid && err < 1.0 / 4096.0, $sformatf("idx %0d mode %0d s %0d: %f exp %f", i, m, s, ym, y));
      if (s >= n / 2 && ((ym > 0) ? ym : -ym) > peak) peak = (ym > 0) ? ym : -ym;
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real p;
    x1 = 0; x2 = 0; a1 = 0; a2 = 0; maxerr = 0;
    idx = '0; mode = 0; dry = '0; dry_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    run(0,    0, 0.0, 0.5, 400, p);
    run(511,  0, 0.0, 0.5, 400, p);
    run(1023, 1, 0.0, 0.5, 400, p);
    run(300,  1, 0.0, 0.9, 400, p);
    // sine at the centre frequency of entry 700
    run(700,  0, fc_of(700), 0.5, 2000, p);
    check(p > 0.45 && p < 0.55, $sformatf("band-pass passes fc (peak %f)", p));
    run(700,  1, fc_of(700), 0.5, 2000, p);
    check(p < 0.05, $sformatf("band-reject removes fc (peak %f)", p));
    run(700,  0, 100.0, 0.5, 2000, p);
    check(p < 0.15, $sformatf("band-pass attenuates 100 Hz (peak %f)", p));
    check(mode_switches >= 3 && idx_changes >= 4, "mode switches and coefficient changes");
    check(clips > 0, "output saturation exercised");
    $display("max error %e, mode switches %0d, index changes %0d", maxerr, mode_switches, idx_changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
