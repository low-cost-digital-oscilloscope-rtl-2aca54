// tb_trigger: checks the level trigger against a reference model.
// A stream of random samples, with random trigger levels and gaps between
// sample strobes, is fed in; the expected trigger is computed from the
// previous and current sample (previous < level <= current). Also checks
// that no trigger is given for the first sample after reset and that the
// trigger is only ever high together with sample_en.
module tb_trigger;
  import osc_pkg::*;
  logic clk = 0, rst = 1;
  logic sample_en = 0;
  logic [7:0] sample = 0, level = 8'd100;
  logic trig;
  int checks = 0, failures = 0, fired = 0;

  trigger dut (.clk, .rst, .sample_en, .sample, .trig_level(level), .trig);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] prev;
    automatic bit have_prev = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // first sample after reset: above level, previous unknown -> no trigger
    @(negedge clk); sample = 8'd200; sample_en = 1;
    #1 check(trig == 0, "no trigger on first sample");
    @(negedge clk); sample_en = 0; prev = 8'd200; have_prev = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (i % 500 == 0) level = 8'($urandom_range(20, 235));
      sample_en = ($urandom_range(0, 3) == 0);
      // bias samples around the level so crossings are frequent
      sample = 8'(($urandom_range(0, 1) != 0) ? $urandom_range(0, 255) : int'(level) + $urandom_range(0, 6) - 3);
      #1;
      if (sample_en) begin
        bit exp;
        exp = (prev < level) && (sample >= level);
        check(trig == exp, $sformatf("trig prev=%0d cur=%0d lvl=%0d", prev, sample, level));
        if (exp) fired++;
        prev = sample;
      end else begin
        check(trig == 0, "trig without sample_en");
      end
    end
    check(fired > 50, $sformatf("trigger fired %0d times", fired));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
