// tb_ctrl_ui: checks the mouse-to-settings control unit (MOVE_SHIFT = 0).
// Random packets are applied; a reference model predicts the trigger
// level (level + dy, clamped to 0..255), the scale selector (advances
// 0,1,2,3,0 on each left-button press) and the coupling (toggles on each
// right-button press). Runs of large movements drive the level into both
// limits, and buttons held over several packets must not repeat.
module tb_ctrl_ui;
  import osc_pkg::*;
  logic clk = 0, rst = 1, pkt_valid = 0;
  mouse_pkt_t pkt = '0;
  settings_t settings;
  int checks = 0, failures = 0, hit_top = 0, hit_bottom = 0;

  ctrl_ui dut (.clk, .rst, .pkt, .pkt_valid, .settings);

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
    automatic int lvl = 128, scale = 0;
    automatic bit ac = 0;
    automatic bit pl = 0, pr = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    @(negedge clk);
    check(settings.trig_level == 8'd128 && settings.coupling == COUPLING_DC && settings.scale_sel == 2'd0, "reset settings");
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      pkt_valid = 1'($urandom_range(0, 1));
      pkt.left   = ($urandom_range(0, 3) == 0) ? ~pkt.left  : pkt.left;
      pkt.right  = ($urandom_range(0, 3) == 0) ? ~pkt.right : pkt.right;
      pkt.middle = 1'($urandom);
      pkt.dx     = 9'($urandom);
      if ((i / 100) % 4 == 1)      pkt.dy = 9'sd200;     // push to the top
      else if ((i / 100) % 4 == 3) pkt.dy = -9'sd200;    // push to the bottom
      else                         pkt.dy = 9'($signed($urandom_range(0, 40)) - 20);
      if (pkt_valid) begin
        lvl = lvl + int'(pkt.dy);
        if (lvl > 255) lvl = 255;
        if (lvl < 0) lvl = 0;
        if (lvl == 255) hit_top++;
        if (lvl == 0) hit_bottom++;
        if (pkt.left && !pl) scale = (scale + 1) % 4;
        if (pkt.right && !pr) ac = !ac;
        pl = pkt.left; pr = pkt.right;
      end
      @(negedge clk);
      pkt_valid = 0;
      check(settings.trig_level == 8'(lvl), $sformatf("level %0d vs %0d", settings.trig_level, lvl));
      check(settings.scale_sel == 2'(scale), "scale");
      check((settings.coupling == COUPLING_AC) == ac, "coupling");
    end
    check(hit_top > 0 && hit_bottom > 0, "both level limits reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
