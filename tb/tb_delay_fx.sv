// tb_delay_fx: self-checking testbench of the feedback delay.
// The testbench plays the processor: it serves the effect's read address
// from its own copy of the effect memory, stores the written words, and
// checks every wet sample, read address and written word against a
// reference ring-buffer model of  y = x + mem[ptr], mem[ptr] = level*y.
// It runs 60 samples at delaytime 5, then 40 at delaytime 3 (the ring
// shrinks and wraps sooner), with full-scale inputs to hit saturation, and
// delivers dry data and read data in both orders.
module tb_delay_fx;
  import dafx_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ram_addr_t delaytime;
  audio_t    level, dry, wet, wr_data, rd_data;
  logic      dry_valid, wet_valid, wr_valid, rd_valid;
  ram_addr_t wr_addr, rd_addr;

  delay_fx dut (
    .clk(clk), .rst_n(rst_n), .delaytime_i(delaytime), .level_i(level),
    .dry_i(dry), .dry_valid_i(dry_valid), .wet_o(wet), .wet_valid_o(wet_valid),
    .ram_wr_addr_o(wr_addr), .ram_wr_data_o(wr_data), .ram_wr_valid_o(wr_valid),
    .ram_rd_addr_o(rd_addr), .ram_rd_data_i(rd_data), .ram_rd_valid_i(rd_valid)
  );

  int checks = 0, failures = 0, sat_hits = 0, wraps = 0;
  audio_t sdram [1024];
  audio_t mem_m [1024];
  int     ptr_m = 0;

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

  task automatic one_sample(input audio_t x, input int order);
    audio_t exp_y, exp_fb;
    longint s;
    int     n;
    check(rd_addr == ram_addr_t'(ptr_m), $sformatf("rd_addr %0d exp %0d", rd_addr, ptr_m));
    s      = longint'(x) + longint'(mem_m[ptr_m]);
    exp_y  = sat(s);
    if (s != longint'(exp_y)) sat_hits++;
    exp_fb = sat((longint'(exp_y) * longint'(level)) >>> 23);
    if (order == 0) begin
      dry = x; dry_valid = 1'b1; @(negedge clk); dry_valid = 1'b0;
      repeat (2) @(negedge clk);
      rd_data = sdram[rd_addr[9:0]]; rd_valid = 1'b1; @(negedge clk); rd_valid = 1'b0;
    end else begin
      rd_data = sdram[rd_addr[9:0]]; rd_valid = 1'b1; @(negedge clk); rd_valid = 1'b0;
      @(negedge clk);
      dry = x; dry_valid = 1'b1; @(negedge clk); dry_valid = 1'b0;
    end
    n = 0;
    while (!wet_valid && n < 10) begin @(negedge clk); n++; end
    check(n == 0, "wet one clock after the last input");
    check(wet_valid && wet == exp_y, $sformatf("wet %0d exp %0d", wet, exp_y));
    check(wr_valid && wr_addr == ram_addr_t'(ptr_m) && wr_data == exp_fb,
          $sformatf("write @%0d=%0d exp @%0d=%0d", wr_addr, wr_data, ptr_m, exp_fb));
    if (wr_valid) sdram[wr_addr[9:0]] = wr_data;
    mem_m[ptr_m] = exp_fb;
    ptr_m = (ptr_m + 1 >= int'(delaytime)) ? 0 : ptr_m + 1;
    if (ptr_m == 0) wraps++;
    @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin sdram[i] = '0; mem_m[i] = '0; end
    dry = '0; dry_valid = 0; rd_data = '0; rd_valid = 0;
    delaytime = 22'd5;
    level = 24'sd4194304;   // 0.5
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 60; i++)
      one_sample((i % 5 == 0) ? 24'sd8000000 : audio_t'($signed($urandom_range(0, 200000)) - 100000), i % 2);
    delaytime = 22'd3;
    level = -24'sd6291456;  // -0.75
    for (int i = 0; i < 40; i++)
      one_sample((i % 7 == 0) ? -24'sd8300000 : audio_t'($signed($urandom_range(0, 200000)) - 100000), i % 2);
    check(sat_hits > 0, "saturation exercised");
    check(wraps > 10, "ring wrapped");
    $display("saturations=%0d wraps=%0d", sat_hits, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
