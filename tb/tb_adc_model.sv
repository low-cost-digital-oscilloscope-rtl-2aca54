// tb_adc_model: checks the converter model: transfer function over the
// 1.5 V .. 3.5 V range (code = floor((v - 1.5) / 2 * 256)), clamping
// outside it, the 5-clock latency and the two's complement output format.
module tb_adc_model;
  logic clk = 0, tc = 0;
  real  vin = 2.5;
  logic [7:0] dout;
  int checks = 0, failures = 0;

  adc_model dut (.clk, .vin, .twos_comp(tc), .dout);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v [$];
    int  e [$];
    v = {1.0, 1.5, 1.5078125, 2.0, 2.5, 3.0, 3.49, 3.5, 4.2, 2.25};
    e = {0,   0,   1,         64,  128, 192, 254,  255, 255, 96};
    for (int i = 0; i < v.size() + 4; i++) begin
      if (i < v.size()) vin = v[i];
      #10 clk = 1;
      #10 clk = 0;
      if (i >= 4) check(dout == 8'(e[i-4]), $sformatf("code for %f: %0d vs %0d", v[i-4], dout, e[i-4]));
    end
    tc = 1;
    #1 check(dout == 8'(96 ^ 8'h80), "two's complement format");
    vin = 3.0;
    for (int i = 0; i < 5; i++) begin
      check(dout == 8'(96 ^ 8'h80), "latency: old value still out");
      #10 clk = 1;
      #10 clk = 0;
    end
    check(dout == 8'(192 ^ 8'h80), "new value after 5 clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
