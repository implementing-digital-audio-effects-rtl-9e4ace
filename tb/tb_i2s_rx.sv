// tb_i2s_rx: the testbench acts as the codec's ADC side. It makes its own
// bit clock and word select (bclk period 10 clocks, 32 bit clocks per
// channel, a ratio different from the system default) and sends random
// stereo samples in I2S format (MSB one bit clock after the word-select
// change, data changed on the falling edge). Each received pair must match
// what was sent, with one valid pulse per frame.
module tb_i2s_rx;
  import dafx_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   bclk, lrclk, sdata, valid;
  audio_t left, right;

  i2s_rx dut (.clk(clk), .rst_n(rst_n), .bclk_i(bclk), .lrclk_i(lrclk), .sdata_i(sdata),
              .left_o(left), .right_o(right), .valid_o(valid));

  int checks = 0, failures = 0, valids = 0;
  logic [23:0] sent_l [64];
  logic [23:0] sent_r [64];

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

  // receiver check
  initial begin
    forever begin
      @(negedge clk);
      if (valid) begin
        check(valids < 64 && left == sent_l[valids] && right == sent_r[valids],
              $sformatf("frame %0d: %h %h exp %h %h", valids, left, right, sent_l[valids], sent_r[valids]));
        valids++;
      end
    end
  end

  // codec model: 64 frames, slot 0 of each channel is the delay bit
  initial begin
    logic [23:0] w;
    bclk = 0; lrclk = 1; sdata = 0;
    for (int f = 0; f < 64; f++) begin
      sent_l[f] = 24'($urandom);
      sent_r[f] = 24'($urandom);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 64; f++) begin
      for (int ch = 0; ch < 2; ch++) begin
        w = ch ? sent_r[f] : sent_l[f];
        for (int b = 0; b < 32; b++) begin
          // falling edge: change word select and data
          @(negedge clk);
          bclk  = 0;
          lrclk = ch[0];
          sdata = (b >= 1 && b <= 24) ? w[24 - b] : 1'($urandom);
          repeat (5) @(negedge clk);
          bclk = 1;
          repeat (4) @(negedge clk);
        end
      end
    end
    repeat (40) @(negedge clk);
    check(valids == 63 || valids == 64, $sformatf("%0d frames received", valids));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
