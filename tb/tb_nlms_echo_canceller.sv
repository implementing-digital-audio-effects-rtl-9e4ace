// tb_nlms_echo_canceller: self-checking testbench of the NLMS echo canceller
// at its full size (1300 taps in 5 sections).
// The microphone signal is the far-end noise passed through a short echo
// path (three reflections) plus the testbench's own fixed-point NLMS model,
// written from the update equations independently of the RTL structure: a
// plain 1300-entry delay line and weight vector. Every y and e must match the
// model bit for bit. The run also checks
//   - the processing time of every sample against the 1088 clocks available
//     between two samples at 48 MHz / 44117 Hz,
//   - that the echo is reduced (residual energy well below the echo energy),
//   - that a sample offered while busy is rejected with overrun_o.
module tb_nlms_echo_canceller;
  import dafx_pkg::*;

  localparam int TAPS = 1300;
  localparam int NS   = 3000;
  localparam longint DELTA = 64'sd68719476736;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [23:0] mu;
  audio_t      u, d, e, y;
  logic        in_valid, ready, out_valid, overrun;

  nlms_echo_canceller dut (
    .clk(clk), .rst_n(rst_n), .mu_i(mu), .u_i(u), .d_i(d), .in_valid_i(in_valid),
    .ready_o(ready), .e_o(e), .y_o(y), .out_valid_o(out_valid), .overrun_o(overrun)
  );

  int checks = 0, failures = 0, overruns = 0, max_cycles = 0, nbad = 0;
  longint xs [TAPS];
  longint w  [TAPS];
  longint norm = 0;
  audio_t hist [16];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (nbad++ < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic longint sat(input longint v, input int bits);
    longint mx = (longint'(1) <<< (bits - 1)) - 1;
    if (v > mx) return mx;
    if (v < -mx - 1) return -mx - 1;
    return v;
  endfunction

  // one step of the reference model; returns y and e
  task automatic model(input audio_t un, input audio_t dn, output longint ym, output longint em);
    longint acc, num, g, q;
    logic [127:0] dividend, quot;
    norm = norm + longint'(un) * longint'(un) - xs[TAPS-1] * xs[TAPS-1];
    for (int k = TAPS - 1; k > 0; k--) xs[k] = xs[k-1];
    xs[0] = longint'(un);
    acc = 0;
    for (int k = 0; k < TAPS; k++) acc += (w[k] * xs[k]) >>> 30;
    ym  = sat(acc, 24);
    em  = sat(longint'(dn) - ym, 24);
    num = longint'(mu) * em;
    dividend = 128'((num < 0) ? -num : num) << 30;
    quot = dividend / 128'(norm + DELTA);
    q   = (quot > 128'((longint'(1) <<< 39) - 1)) ? (longint'(1) <<< 39) - 1 : longint'(quot);
    g   = (num < 0) ? -q : q;
    for (int k = 0; k < TAPS; k++) w[k] = sat(w[k] + ((g * xs[k]) >>> 23), 32);
  endtask

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ym, em, echo;
    real    e_first, e_last, d_last;
    int     cyc;
    for (int k = 0; k < TAPS; k++) begin xs[k] = 0; w[k] = 0; end
    for (int k = 0; k < 16; k++) hist[k] = '0;
    mu = 24'd4194304;   // 0.5
    u = '0; d = '0; in_valid = 0;
    e_first = 0; e_last = 0; d_last = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    while (!ready) @(negedge clk);
    for (int n = 0; n < NS; n++) begin
      for (int k = 15; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = audio_t'($signed($urandom_range(0, 2000000)) - 1000000);
      // echo path: 0.5 z^-3 - 0.3 z^-7 + 0.2 z^-12
      echo = (longint'(hist[3]) * 4194304 - longint'(hist[7]) * 2516582
              + longint'(hist[12]) * 1677722) >>> 23;
      u = hist[0];
      d = audio_t'(echo);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      model(hist[0], audio_t'(echo), ym, em);
      cyc = 1;
      if (n == 5) begin
        // a second sample while the first is still being processed
        @(negedge clk); cyc++;
        in_valid = 1; @(negedge clk); in_valid = 0; cyc++;
        check(overrun, "overrun flagged");
        if (overrun) overruns++;
      end
      while (!out_valid) begin @(negedge clk); cyc++; end
      check(y == audio_t'(ym) && e == audio_t'(em),
            $sformatf("n=%0d y %0d exp %0d, e %0d exp %0d", n, y, ym, e, em));
      if (n < 200)      e_first += real'(e) * real'(e);
      if (n >= NS - 200) begin
        e_last += real'(e) * real'(e);
        d_last += real'(echo) * real'(echo);
      end
      while (!ready) begin @(negedge clk); cyc++; end
      if (cyc > max_cycles) max_cycles = cyc;
    end
    check(max_cycles <= 1088, $sformatf("%0d clocks per sample exceeds 1088", max_cycles));
    check(e_last < 0.05 * d_last, $sformatf("echo reduced: residual/echo = %f", e_last / d_last));
    check(overruns == 1, "overrun seen once");
    $display("clocks per sample %0d, residual/echo energy at the end %f, first 200 %f",
             max_cycles, e_last / d_last, e_first / d_last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
