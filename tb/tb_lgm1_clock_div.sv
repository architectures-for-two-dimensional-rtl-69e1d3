// tb_lgm1_clock_div -- checks that bdclk has a period of four SYSCLKs with
// a 50% duty cycle, and that bdclk_en is high exactly in the SYSCLK cycle
// before each rising edge of bdclk.
`timescale 1ns/1ps
module tb_lgm1_clock_div;
  logic clk = 0, bdclk, en;
  int checks = 0, failures = 0;
  int last_rise = -1, highs = 0;

  lgm1_clock_div dut (.clk(clk), .bdclk(bdclk), .bdclk_en(en));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_b, prev_en;
    repeat (8) @(posedge clk);
    #1;
    prev_b = bdclk; prev_en = en;
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(posedge clk);
      #1;
      checks++;
      // a rising edge of bdclk happens exactly after an enabled cycle
      if ((bdclk && !prev_b) !== prev_en) failures++;
      if (bdclk && !prev_b) begin
        if (last_rise >= 0) begin
          checks++;
          if (cyc - last_rise != 4) failures++;
        end
        last_rise = cyc;
      end
      if (bdclk) highs++;
      prev_b = bdclk; prev_en = en;
    end
    checks++;
    if (highs != 200) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
