// tb_vga_timing: checks the 640x480 timing generator at full size, with a
// pixel strobe every other board cycle, for two whole frames and a bit.
// An independent pixel counter predicts x, y, active, hsync_n (low for
// pixels 656..751 of each 800-pixel line), vsync_n (low for lines 490..491
// of each 525-line frame) and the frame_start pulse (once per frame, when
// line 480 begins). Also counts active pixels per frame (640*480).
module tb_vga_timing;
  logic clk = 0, rst = 1, pix_en = 0;
  logic [9:0] x, y;
  logic active, hsync_n, vsync_n, frame_start;
  int checks = 0, failures = 0, fs_seen = 0;

  vga_timing dut (.clk, .rst, .pix_en, .x, .y, .active, .hsync_n, .vsync_n, .frame_start);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (x=%0d y=%0d)", msg, x, y); end
  endtask

  initial begin
    #40000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int ex = 0, ey = 0, act = 0, frames = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int p = 0; p < 2 * 800 * 525 + 1000; p++) begin
      @(negedge clk); pix_en = 1;
      @(negedge clk); pix_en = 0;
      if (ex == 799) begin ex = 0; ey = (ey == 524) ? 0 : ey + 1; end else ex++;
      check(x == 10'(ex) && y == 10'(ey), $sformatf("counter expected %0d,%0d", ex, ey));
      check(active == (ex < 640 && ey < 480), "active");
      check(hsync_n == !(ex >= 656 && ex < 752), "hsync");
      check(vsync_n == !(ey >= 490 && ey < 492), "vsync");
      if (active) act++;
      if (ex == 0 && ey == 480) begin
        // frame_start was a single-cycle pulse in the previous cycle
        frames++;
        check(act == 640 * 480 - (frames == 1 ? 1 : 0) || act == 640 * 480, $sformatf("active pixels %0d", act));
        act = 0;
      end
    end
    check(fs_seen == frames && frames == 2, $sformatf("frame_start pulses %0d for %0d frames", fs_seen, frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count frame_start pulses and check their position
  always @(posedge clk) if (!rst && frame_start) begin
    fs_seen++;
    check(x == 0 && y == 480, "frame_start position");
  end
endmodule
