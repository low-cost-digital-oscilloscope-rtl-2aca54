// tb_clk_ctrl: checks the clock control at its default dividers (4 and 4,
// i.e. 25 MHz sample and pixel rates from a 100 MHz board clock).
// Checks: one sample_en and one pix_en every 4 cycles, adc_clk a 50 %
// square wave of period 4, and sample_en in the cycle right before each
// rising edge of adc_clk.
module tb_clk_ctrl;
  logic clk = 0, rst = 1;
  logic adc_clk, sample_en, pix_en;
  int checks = 0, failures = 0;

  clk_ctrl dut (.clk, .rst, .adc_clk, .sample_en, .pix_en);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int last_s = -1, last_p = -1, high = 0, cyc = 0;
    logic prev_adc, prev_sen;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    prev_adc = adc_clk; prev_sen = 0;
    for (cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      if (sample_en) begin
        if (last_s >= 0) check(cyc - last_s == 4, "sample_en period");
        last_s = cyc;
      end
      if (pix_en) begin
        if (last_p >= 0) check(cyc - last_p == 4, "pix_en period");
        last_p = cyc;
      end
      if (adc_clk) high++;
      if (adc_clk && !prev_adc) check(prev_sen, "sample_en right before adc_clk rise");
      if (prev_sen) check(adc_clk && !prev_adc, "adc_clk rises after sample_en");
      prev_adc = adc_clk;
      prev_sen = sample_en;
    end
    check(high == 200, $sformatf("adc_clk duty %0d/400", high));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
