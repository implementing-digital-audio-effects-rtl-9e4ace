// tb_flanger: self-checking testbench of the flanger.
// The testbench plays the processor and keeps its own model: a sine LFO
// computed in floating point gives the expected delay
//     D = base + depth * (s + 32768) / 65536
// (a read address is accepted if it matches D for s-1, s or s+1, to allow
// for rounding of the sine table); the wet sample must equal
// sat(x + buffer[read address]) and the written word sat(level * y) at the
// write pointer. The LFO runs fast so that the delay sweeps its whole range
// several times, which is counted.
module tb_flanger;
  import dafx_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [9:0]  base, depth;
  logic [23:0] lfo_inc;
  audio_t      level, dry, wet, wr_data, rd_data;
  logic        dry_valid, wet_valid, wr_valid, rd_valid;
  ram_addr_t   wr_addr, rd_addr;

  flanger dut (
    .clk(clk), .rst_n(rst_n), .base_i(base), .depth_i(depth), .lfo_inc_i(lfo_inc),
    .level_i(level),
    .dry_i(dry), .dry_valid_i(dry_valid), .wet_o(wet), .wet_valid_o(wet_valid),
    .ram_wr_addr_o(wr_addr), .ram_wr_data_o(wr_data), .ram_wr_valid_o(wr_valid),
    .ram_rd_addr_o(rd_addr), .ram_rd_data_i(rd_data), .ram_rd_valid_i(rd_valid)
  );

  int checks = 0, failures = 0, at_min = 0, at_max = 0;
  audio_t sdram [1024];
  audio_t mem_m [1024];
  longint phase_m = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic audio_t sat(input longint v);
    if (v > 8388607) return 24'sd8388607;
    if (v < -8388608) return -24'sd8388608;
    return audio_t'(v);
  endfunction

  function automatic int delay_for(input int s);
    return int'(base) + int'((longint'(depth) * longint'(s + 32768)) >>> 16);
  endfunction

  task automatic one_sample(input int n, input audio_t x);
    real    a;
    int     s, rd, ok;
    audio_t exp_y, exp_fb;
    a  = 2.0 * 3.14159265358979 * real'((phase_m & 64'hFFFFFF) >> 16) / 256.0;
    s  = $rtoi(32767.0 * $sin(a) + (($sin(a) >= 0) ? 0.5 : -0.5));
    ok = 0;
    for (int e = -1; e <= 1; e++)
      if (rd_addr == ram_addr_t'((n - delay_for(s + e)) & 1023)) ok = 1;
    check(ok == 1, $sformatf("n=%0d rd_addr %0d exp %0d", n, rd_addr, (n - delay_for(s)) & 1023));
    if (delay_for(s) == int'(base)) at_min++;
    if (delay_for(s) >= int'(base) + int'(depth) - 1) at_max++;
    rd     = int'(rd_addr[9:0]);
    exp_y  = sat(longint'(x) + longint'(mem_m[rd]));
    exp_fb = sat((longint'(exp_y) * longint'(level)) >>> 23);
    rd_data = sdram[rd]; rd_valid = 1; @(negedge clk); rd_valid = 0;
    dry = x; dry_valid = 1; @(negedge clk); dry_valid = 0;
    check(wet_valid && wet == exp_y, $sformatf("n=%0d wet %0d exp %0d", n, wet, exp_y));
    check(wr_valid && wr_addr == ram_addr_t'(n & 1023) && wr_data == exp_fb, "feedback write");
    if (wr_valid) sdram[wr_addr[9:0]] = wr_data;
    mem_m[n & 1023] = exp_fb;
    phase_m = phase_m + longint'(lfo_inc);
    @(negedge clk);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin sdram[i] = '0; mem_m[i] = '0; end
    dry = '0; dry_valid = 0; rd_data = '0; rd_valid = 0;
    base    = 10'd20;
    depth   = 10'd300;
    lfo_inc = 24'd83886;       // period 200 samples (fast, for the test)
    level   = 24'sd5872026;    // 0.7
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 1200; n++)
      one_sample(n, audio_t'($signed($urandom_range(0, 4000000)) - 2000000));
    check(at_min > 0 && at_max > 0, "delay swept between base and base+depth");
    $display("at_min=%0d at_max=%0d", at_min, at_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
