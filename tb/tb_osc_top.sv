// tb_osc_top: end-to-end test of the oscilloscope at its default sizes
// (100 MHz board clock, 25 MHz sampling and pixel rate, 640-sample
// record, full 640x480 VGA frames, real PS/2 timing).
//
// A 200 kHz sine of 0.9 V amplitude around 2.5 V is converted by the ADC
// model, clocked by the design's adc_clk. A PS/2 mouse model is attached.
// The test:
//   1. waits for the mouse to be enabled (0xF4 sent, 0xFA received);
//   2. waits for a record; every word the converter put out is logged,
//      and the record in the sample memory must equal a 640-word stretch
//      of that log that starts where the signal rises through the trigger
//      level (first word >= level, the word before < level);
//   3. decodes one whole VGA frame shown while that record is held, using
//      only hsync_n/vsync_n/rgb, and compares every visible pixel with the
//      trace expected from the logged words;
//   4. moves the mouse up by 40 (trigger level 128 -> 168), clicks the
//      left button (scale 0 -> 1) and the right button (DC -> AC), checks
//      the front-end control outputs, then repeats 2 and 3 with the new
//      trigger level.
// It counts each mechanism (trigger start, record completion, hold and
// re-arm, trigger ignored while busy, memory written while being read for
// display, mouse init, packets, level/scale/coupling changes) and counts a
// failure for any that never happened.
module tb_osc_top;
  import osc_pkg::*;
  logic clk = 0, rst = 1;
  logic adc_clk, coupling_ac, hsync_n, vsync_n;
  logic [1:0] scale_sel;
  logic [7:0] adc_data;
  rgb_t rgb;
  logic ps2_clk, ps2_data, ps2_clk_low, ps2_data_low;
  real  vin = 2.5;
  int checks = 0, failures = 0;

  osc_top dut (
    .clk, .rst, .adc_data, .adc_clk, .coupling_ac, .scale_sel,
    .rgb, .hsync_n, .vsync_n,
    .ps2_clk_i(ps2_clk), .ps2_data_i(ps2_data),
    .ps2_clk_low, .ps2_data_low);

  adc_model adc (.clk(adc_clk), .vin, .twos_comp(1'b0), .dout(adc_data));

  ps2_mouse_model #(.HALF_NS(30000)) mouse (
    .host_clk_low(ps2_clk_low), .host_data_low(ps2_data_low), .ps2_clk, .ps2_data);

  always #5 clk = ~clk;

  // input signal
  always @(posedge adc_clk) vin = 2.5 + 0.9 * $sin(2.0 * 3.14159265358979 * 200.0e3 * $realtime * 1.0e-9);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL: %s", msg); end
  endtask

  // log of converter output words, one per sample period
  logic [7:0] adc_log [$];
  always @(posedge adc_clk) if (!rst) adc_log.push_back(adc_data);

  // ---- mechanism counters --------------------------------------------
  int n_trig_start = 0, n_records = 0, n_rearm = 0, n_trig_ignored = 0;
  int n_rw_overlap = 0, n_packets = 0, n_pix_lit = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_cap.armed && dut.trig && dut.sample_en) n_trig_start++;
    if (!dut.u_cap.armed && dut.trig) n_trig_ignored++;
    if (dut.we && dut.u_img.active) n_rw_overlap++;
    if (dut.pkt_valid) n_packets++;
    if (dut.u_cap.state == 2 && dut.frame_start && 32'(dut.u_cap.frames) + 1 >= 2) n_rearm++;
  end

  // ---- VGA decoder from the output pins --------------------------------
  int vx = 0, vy = 0;
  logic prev_hs = 1, prev_vs = 1;
  rgb_t frame_img [480][640];
  bit   grab = 0, grabbed = 0;
  always @(posedge clk) if (!rst && dut.pix_en) begin
    // at a pixel strobe the pins still show the pixel that is ending now
    if (prev_hs && !hsync_n) vx = 656;
    else vx = (vx == 799) ? 0 : vx + 1;
    if (vx == 0) vy = (vy == 524) ? 0 : vy + 1;
    if (prev_vs && !vsync_n) vy = 490;
    prev_hs = hsync_n;
    prev_vs = vsync_n;
    if (grab && vx < 640 && vy < 480) begin
      frame_img[vy][vx] = rgb;
      if (vx == 639 && vy == 479) begin grab = 0; grabbed = 1; end
    end
  end

  function automatic int row(input int s);
    return 479 - (s * 480) / 256;
  endfunction

  // find the record in the converter log and check the sample memory
  task automatic check_record(input int level, output logic [7:0] rec [640]);
    int found = -1;
    repeat (4) @(posedge clk);
    for (int i = 0; i < 640; i++) rec[i] = dut.u_ram.mem[i];
    for (int j = 1; j + 640 <= adc_log.size(); j++) begin
      if (adc_log[j] >= 8'(level) && adc_log[j-1] < 8'(level)) begin
        bit same = 1;
        for (int i = 0; i < 640 && same; i++) if (adc_log[j+i] != rec[i]) same = 0;
        if (same) begin found = j; break; end
      end
    end
    check(found >= 0, $sformatf("record matches a trigger crossing of level %0d in the input", level));
    check(rec[0] >= 8'(level), "record starts at or above the level");
  endtask

  task automatic check_image(input logic [7:0] rec [640]);
    int bad = 0, lit = 0;
    grab = 0; grabbed = 0;
    @(negedge vsync_n);
    grab = 1;
    wait (grabbed);
    for (int y = 0; y < 480; y++)
      for (int x = 0; x < 640; x++) begin
        int r0, r1, lo, hi;
        bit e;
        r1 = row(int'(rec[x]));
        r0 = (x == 0) ? r1 : row(int'(rec[x-1]));
        lo = (r0 < r1) ? r0 : r1;
        hi = (r0 < r1) ? r1 : r0;
        e = (y >= lo && y <= hi);
        if (e) lit++;
        if (frame_img[y][x] != (e ? COLOR_TRACE : COLOR_BG)) begin
          bad++;
          if (bad < 5) $display("FAIL: pixel %0d,%0d got %h, samples %0d %0d", x, y, frame_img[y][x], x > 0 ? rec[x-1] : 0, rec[x]);
        end
      end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL: %0d pixels differ", bad); end
    n_pix_lit += lit;
    check(lit >= 640, "trace drawn");
  endtask

  initial begin
    #200ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] rec [640];
    int caps;
    repeat (5) @(posedge clk);
    @(negedge clk); rst = 0;
    // 1. mouse enable
    wait (dut.mouse_ready);
    check(mouse.last_cmd == 8'hF4, "enable command sent");
    // 2./3. first record at the reset level
    caps = int'(dut.u_cap.captures);
    wait (int'(dut.u_cap.captures) == caps + 1);
    n_records++;
    check_record(128, rec);
    check_image(rec);
    check(scale_sel == 2'd0 && coupling_ac == 1'b0, "front-end settings after reset");
    // 4. mouse: up 40 with left button, then right button
    mouse.send_packet(1'b1, 1'b0, 1'b0, 9'sd0, 9'sd40);
    mouse.send_packet(1'b0, 1'b1, 1'b0, 9'sd5, 9'sd0);
    mouse.send_packet(1'b0, 1'b0, 1'b0, 9'sd0, 9'sd0);
    #200us;
    check(scale_sel == 2'd1, "scale stepped by the left button");
    check(coupling_ac == 1'b1, "coupling toggled by the right button");
    check(dut.settings.trig_level == 8'd168, "trigger level moved by the mouse");
    // next complete record taken at the new level
    caps = int'(dut.u_cap.captures);
    wait (int'(dut.u_cap.captures) == caps + 1);
    n_records++;
    check_record(168, rec);
    check_image(rec);
    // mechanisms
    check(n_trig_start >= 2, $sformatf("trigger started records: %0d", n_trig_start));
    check(n_records >= 2, "records completed");
    check(n_rearm >= 1, $sformatf("re-armed after hold: %0d", n_rearm));
    check(n_trig_ignored >= 1, $sformatf("triggers ignored while busy: %0d", n_trig_ignored));
    check(n_rw_overlap >= 1, $sformatf("memory written while read for display: %0d", n_rw_overlap));
    check(n_packets == 3, $sformatf("mouse packets: %0d", n_packets));
    $display("mechanisms: trig_start=%0d records=%0d rearm=%0d trig_ignored=%0d rw_overlap=%0d packets=%0d lit_pixels=%0d",
             n_trig_start, n_records, n_rearm, n_trig_ignored, n_rw_overlap, n_packets, n_pix_lit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
