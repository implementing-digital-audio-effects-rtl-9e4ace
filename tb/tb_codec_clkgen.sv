// tb_codec_clkgen: checks the codec clock divider with its default ratios:
// mclk toggles every 2 clocks (12 MHz), bclk has a period of 16 clocks with
// 50 % duty, lrclk has a period of 1088 clocks (44117 Hz frame rate at
// 48 MHz) split 544/544, changes only together with a falling bclk edge, and
// each channel has 34 bit clocks.
module tb_codec_clkgen;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic mclk, bclk, lrclk;
  codec_clkgen dut (.clk(clk), .rst_n(rst_n), .mclk_o(mclk), .bclk_o(bclk), .lrclk_o(lrclk));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic pm, pb, pl;
    int   t, last_m, last_b_rise, last_l_rise, last_l_fall, bclks, frames;
    last_m = -1; last_b_rise = -1; last_l_rise = -1; last_l_fall = -1; bclks = 0; frames = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    pm = mclk; pb = bclk; pl = lrclk;
    for (t = 0; t < 6000; t++) begin
      @(negedge clk);
      if (mclk != pm) begin
        if (last_m >= 0) check(t - last_m == 2, "mclk half period 2");
        last_m = t;
      end
      if (bclk && !pb) begin
        if (last_b_rise >= 0) check(t - last_b_rise == 16, "bclk period 16");
        last_b_rise = t;
        bclks++;
      end
      if (lrclk != pl) begin
        check(pb && !bclk, "lrclk changes with a falling bclk edge");
        if (lrclk) begin
          if (last_l_fall >= 0) check(t - last_l_fall == 544, "left half 544 clocks");
          if (last_l_fall >= 0) check(bclks == 34, $sformatf("%0d bit clocks per channel", bclks));
          if (last_l_rise >= 0) begin
            check(t - last_l_rise == 1088, "frame 1088 clocks");
            frames++;
          end
          last_l_rise = t;
        end else begin
          if (last_l_rise >= 0) check(t - last_l_rise == 544, "right half 544 clocks");
          last_l_fall = t;
        end
        bclks = 0;
      end
      pm = mclk; pb = bclk; pl = lrclk;
    end
    check(frames >= 4, "frames observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
