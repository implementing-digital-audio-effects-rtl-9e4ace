// tb_chorus: self-checking testbench of the chorus at its default two
// voices. The testbench plays the processor (serves reads from its own copy
// of the effect memory, stores writes) and checks every read address against
// an independent model of the delays  D_v = fix + sweep * tri_v / 2^23, each
// voice with its own triangle half a period apart, every wet sample against
// x + sum_v buffer[wp - D_v] and every write against (wp, x). The dry sample
// is delivered before, between and after the voice reads. A fast LFO makes
// the triangle turn several times; the run counts the turns and requires the
// sweep to cover its whole range and the two voices to move oppositely.
module tb_chorus;
  import dafx_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [10:0] fixdelay, sweep;
  logic [23:0] lfo_inc;
  audio_t      dry, wet, wr_data, rd_data;
  logic        dry_valid, wet_valid, wr_valid, rd_valid;
  ram_addr_t   wr_addr, rd_addr;

  chorus dut (
    .clk(clk), .rst_n(rst_n), .fixdelay_i(fixdelay), .sweep_i(sweep), .lfo_inc_i(lfo_inc),
    .dry_i(dry), .dry_valid_i(dry_valid), .wet_o(wet), .wet_valid_o(wet_valid),
    .ram_wr_addr_o(wr_addr), .ram_wr_data_o(wr_data), .ram_wr_valid_o(wr_valid),
    .ram_rd_addr_o(rd_addr), .ram_rd_data_i(rd_data), .ram_rd_valid_i(rd_valid)
  );

  int checks = 0, failures = 0, turns = 0, last_dir = 0;
  int min_d = 1 << 30, max_d = 0, prev_d = -1, prev_d1 = -1, opposite = 0, n_sat = 0;
  audio_t sdram [2048];
  audio_t hist  [2048];
  longint phase_m = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int model_delay(input longint ph_in);
    longint tri_v, ph;
    ph    = ph_in & 64'hFFFFFF;
    tri_v = (ph >= 64'h800000) ? (64'hFFFFFF - ph) : ph;     // 0 .. 2^23-1
    return int'(fixdelay) + int'((longint'(sweep) * tri_v) >>> 23);
  endfunction

  task automatic read_voice(input int n, input int v, input int d);
    int rd_m;
    rd_m = (n - d) & 2047;
    check(rd_addr == ram_addr_t'(rd_m), $sformatf("n=%0d voice %0d rd_addr %0d exp %0d", n, v, rd_addr, rd_m));
    rd_data = sdram[rd_addr[10:0]]; rd_valid = 1; @(negedge clk); rd_valid = 0;
  endtask

  task automatic one_sample(input int n, input audio_t x, input int order);
    longint s;
    int     d [2];
    int     dir;
    audio_t exp_y;
    d[0] = model_delay(phase_m);
    d[1] = model_delay(phase_m + 64'h800000);
    s    = longint'(x) + longint'(hist[(n - d[0]) & 2047]) + longint'(hist[(n - d[1]) & 2047]);
    exp_y = (s > 8388607) ? 24'sd8388607 : (s < -8388608) ? -24'sd8388608 : audio_t'(s);
    if (s > 8388607 || s < -8388608) n_sat++;
    if (prev_d >= 0 && d[0] != prev_d) begin
      dir = (d[0] > prev_d) ? 1 : -1;
      if (last_dir != 0 && dir != last_dir) turns++;
      last_dir = dir;
    end
    if (prev_d >= 0 && prev_d1 >= 0 && d[0] != prev_d && d[1] != prev_d1 &&
        ((d[0] > prev_d) != (d[1] > prev_d1))) opposite++;
    prev_d  = d[0];
    prev_d1 = d[1];
    if (d[0] < min_d) min_d = d[0];
    if (d[0] > max_d) max_d = d[0];
    case (order)
      0: begin
        dry = x; dry_valid = 1; @(negedge clk); dry_valid = 0;
        read_voice(n, 0, d[0]);
        check(!wet_valid, "no output before the last voice");
        read_voice(n, 1, d[1]);
      end
      1: begin
        read_voice(n, 0, d[0]);
        read_voice(n, 1, d[1]);
        check(!wet_valid, "no output before the dry sample");
        dry = x; dry_valid = 1; @(negedge clk); dry_valid = 0;
      end
      default: begin
        read_voice(n, 0, d[0]);
        dry = x; dry_valid = 1; @(negedge clk); dry_valid = 0;
        check(!wet_valid, "no output before the last voice");
        read_voice(n, 1, d[1]);
      end
    endcase
    check(wet_valid && wet == exp_y, $sformatf("n=%0d wet %0d exp %0d", n, wet, exp_y));
    check(wr_valid && wr_addr == ram_addr_t'(n & 2047) && wr_data == x, "write of the dry sample");
    if (wr_valid) sdram[wr_addr[10:0]] = wr_data;
    hist[n & 2047] = x;
    phase_m = phase_m + longint'(lfo_inc);
    @(negedge clk);
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i++) begin sdram[i] = '0; hist[i] = '0; end
    dry = '0; dry_valid = 0; rd_data = '0; rd_valid = 0;
    fixdelay = 11'd662;                 // 15 ms at 44117 Hz
    sweep    = 11'd265;                 // 6 ms
    lfo_inc  = 24'd167772;              // period 100 samples (fast, for the test)
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 1500; n++)
      one_sample(n, (n % 9 == 0) ? 24'sd7000000 : audio_t'($signed($urandom_range(0, 2000000)) - 1000000), n % 3);
    check(turns >= 4, "triangle turned");
    check(min_d == 662 && max_d >= 662 + 260, "sweep covers fix .. fix+sweep");
    check(opposite > 100, "voices sweep in opposite directions");
    check(n_sat > 0, "saturation of the voice sum exercised");
    $display("turns=%0d delay range %0d..%0d opposite %0d saturated %0d", turns, min_d, max_d, opposite, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
