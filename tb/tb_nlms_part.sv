// tb_nlms_part: self-checking testbench of one echo-canceller section
// (L = 7 taps, small on purpose). The testbench keeps its own delay line and
// weight vector. It shifts random samples in, runs convolution passes and
// compares acc_o with sum((w*u) >>> 30), runs update passes with random steps
// and checks the effect through the next convolution, checks that x_out_o is
// the sample that leaves the section, the pass length (done_o low for L+2
// clocks) and that weights saturate at the largest step.
module tb_nlms_part;
  import dafx_pkg::*;

  localparam int L = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               shift_wr, conv_start, upd_start, done;
  audio_t             x_in, x_out;
  logic signed [39:0] g;
  logic signed [47:0] acc;

  nlms_part #(.L(L)) dut (
    .clk(clk), .rst_n(rst_n), .shift_wr_i(shift_wr), .x_in_i(x_in), .x_out_o(x_out),
    .conv_start_i(conv_start), .upd_start_i(upd_start), .g_i(g), .acc_o(acc), .done_o(done)
  );

  int checks = 0, failures = 0, sats = 0;
  longint xs [L];
  longint w  [L];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // pulse a start for one clock (if any) and count the clocks until done_o
  task automatic wait_done(output int n);
    n = 0;
    @(negedge clk);
    conv_start = 0; upd_start = 0;
    while (!done) begin @(negedge clk); n++; end
  endtask

  task automatic shift(input audio_t x);
    @(negedge clk); @(negedge clk);
    check(longint'(x_out) == xs[L-1], $sformatf("x_out %0d exp %0d", x_out, xs[L-1]));
    x_in = x; shift_wr = 1; @(negedge clk); shift_wr = 0;
    for (int k = L - 1; k > 0; k--) xs[k] = xs[k-1];
    xs[0] = longint'(x);
  endtask

  task automatic conv();
    longint s;
    int n;
    conv_start = 1; wait_done(n);
    s = 0;
    for (int k = 0; k < L; k++) s += (w[k] * xs[k]) >>> 30;
    check(longint'(acc) == s, $sformatf("acc %0d exp %0d", acc, s));
    check(n == L + 1, $sformatf("pass length %0d", n));
  endtask

  task automatic upd(input longint gv);
    int n;
    longint v;
    g = 40'(gv); upd_start = 1; wait_done(n);
    for (int k = 0; k < L; k++) begin
      v = w[k] + ((gv * xs[k]) >>> 23);
      if (v > 64'sd2147483647)  begin v = 64'sd2147483647;  sats++; end
      if (v < -64'sd2147483648) begin v = -64'sd2147483648; sats++; end
      w[k] = v;
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    for (int k = 0; k < L; k++) begin xs[k] = 0; w[k] = 0; end
    shift_wr = 0; conv_start = 0; upd_start = 0; x_in = '0; g = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait_done(n);
    check(n >= L - 1, "memories cleared after reset");
    for (int i = 0; i < 40; i++) begin
      shift(audio_t'($signed($urandom_range(0, 8000000)) - 4000000));
      conv();
      upd(longint'($signed($urandom_range(0, 2000000000))) - 1000000000);
    end
    upd(64'sd549755813887);      // largest step: weights saturate
    upd(64'sd549755813887);
    conv();
    check(sats > 0, "weight saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
