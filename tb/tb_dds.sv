// tb_dds: checks the sine oscillator against sin() computed in floating point
// by the testbench: every table entry (by stepping the phase one entry at a
// time) to within one LSB, exact zero crossings and extremes, phase
// accumulation with a non-power-of-two increment (including wrap-around of
// the accumulator) and the clear input.
module tb_dds;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               clear, step;
  logic [23:0]        inc, phase;
  logic signed [15:0] s;

  dds dut (.clk(clk), .rst_n(rst_n), .clear_i(clear), .step_i(step), .inc_i(inc),
           .sin_o(s), .phase_o(phase));

  int checks = 0, failures = 0, wraps = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int ref_sin(input longint ph);
    real a;
    a = 2.0 * 3.14159265358979 * real'(ph >> 16) / 256.0;
    return int'($rtoi(32767.0 * $sin(a) + (($sin(a) >= 0) ? 0.5 : -0.5)));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ph_m;
    int     d;
    clear = 0; step = 0; inc = 24'd65536;
    repeat (2) @(negedge clk);
    rst_n = 1;
    ph_m = 0;
    for (int i = 0; i < 256; i++) begin
      d = int'(s) - ref_sin(ph_m);
      check(phase == ph_m[23:0] && d <= 1 && d >= -1, $sformatf("entry %0d: %0d ref %0d", i, s, ref_sin(ph_m)));
      if (i == 0 || i == 128) check(s == 0, "zero crossing");
      if (i == 64)  check(s == 16'sd32767, "positive peak");
      if (i == 192) check(s == -16'sd32767, "negative peak");
      step = 1; @(negedge clk); step = 0;
      ph_m = (ph_m + 65536) & 64'hFFFFFF;
    end
    check(phase == 24'd0, "full period returns to phase 0");
    inc = 24'd1234567;
    for (int i = 0; i < 100; i++) begin
      step = (i % 3 != 0);
      @(negedge clk);
      if (step) begin
        if (ph_m + 1234567 > 64'hFFFFFF) wraps++;
        ph_m = (ph_m + 1234567) & 64'hFFFFFF;
      end
      step = 0;
      d = int'(s) - ref_sin(ph_m);
      check(phase == ph_m[23:0] && d <= 1 && d >= -1, "accumulated phase");
    end
    check(wraps > 0, "accumulator wrapped");
    clear = 1; @(negedge clk); clear = 0;
    check(phase == 0 && s == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
