// tb_i2s_tx: the testbench acts as the codec's DAC side. It makes its own bit
// clock and word select (bclk period 10 clocks, 32 bit clocks per channel),
// offers a new random stereo sample during the right half of every frame,
// decodes the serial data on rising bit-clock edges (bit slots 1..24 of each
// channel, MSB first) and compares each decoded pair with the sample offered
// before that frame. Slots outside the word must be zero. One frame is sent
// without a new sample to check that the last sample is repeated.
module tb_i2s_tx;
  import dafx_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   bclk, lrclk, sdata, valid;
  audio_t left, right;

  i2s_tx dut (.clk(clk), .rst_n(rst_n), .bclk_i(bclk), .lrclk_i(lrclk),
              .left_i(left), .right_i(right), .valid_i(valid), .sdata_o(sdata));

  int checks = 0, failures = 0, repeats = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] exp_l, exp_r, got [2];
    logic        stray;
    bclk = 1; lrclk = 1; left = '0; right = '0; valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // first sample, offered before the first frame
    @(negedge clk);
    exp_l = 24'($urandom); exp_r = 24'($urandom);
    left = exp_l; right = exp_r; valid = 1; @(negedge clk); valid = 0;
    for (int f = 0; f < 40; f++) begin
      stray = 0;
      for (int ch = 0; ch < 2; ch++) begin
        got[ch] = '0;
        for (int b = 0; b < 32; b++) begin
          @(negedge clk);
          bclk  = 0;
          lrclk = ch[0];
          repeat (5) @(negedge clk);
          bclk = 1;
          // codec samples on the rising edge
          if (b >= 1 && b <= 24) got[ch][24 - b] = sdata;
          else if (f > 0 && sdata) stray = 1;
          repeat (4) @(negedge clk);
          // offer the next sample in the middle of the right channel
          if (ch == 1 && b == 10 && f != 20) begin
            left = 24'($urandom); right = 24'($urandom);
            valid = 1; @(negedge clk); valid = 0;
          end
        end
      end
      check(got[0] == exp_l && got[1] == exp_r,
            $sformatf("frame %0d: %h %h exp %h %h", f, got[0], got[1], exp_l, exp_r));
      check(!stray, "zero outside the data slots");
      if (f != 20) begin exp_l = left; exp_r = right; end
      else repeats++;
    end
    check(repeats == 1, "repeat frame sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
