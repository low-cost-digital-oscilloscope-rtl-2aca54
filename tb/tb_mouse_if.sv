// tb_mouse_if: checks the PS/2 mouse interface against the mouse model.
// After reset the interface must send 0xF4 (checked in the model, parity
// included) and become ready when the mouse answers 0xFA. Then random
// packets are sent and the decoded buttons and 9-bit signed movements are
// compared with what was sent. Also checks that a stray byte without bit 3
// set in front of a packet is skipped, and that a byte with a parity error
// is dropped without producing a packet. The command inhibit time is
// shortened to 0.5 us to keep the run short.
module tb_mouse_if;
  import osc_pkg::*;
  logic clk = 0, rst = 1;
  logic ps2_clk, ps2_data, clk_low, data_low, ready, pkt_valid;
  mouse_pkt_t pkt;
  int checks = 0, failures = 0, got = 0;
  mouse_pkt_t last;

  mouse_if #(.INHIBIT_CYCLES(50), .RX_TIMEOUT(200)) dut (
    .clk, .rst, .ps2_clk_i(ps2_clk), .ps2_data_i(ps2_data),
    .ps2_clk_low(clk_low), .ps2_data_low(data_low),
    .ready, .pkt, .pkt_valid);

  ps2_mouse_model #(.HALF_NS(200)) mouse (
    .host_clk_low(clk_low), .host_data_low(data_low), .ps2_clk, .ps2_data);

  always #5 clk = ~clk;

  always @(posedge clk) if (pkt_valid) begin got++; last = pkt; end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    check(!ready, "not ready right after reset");
    wait (ready);
    check(mouse.cmds == 1 && mouse.last_cmd == 8'hF4, $sformatf("command %h sent %0d times", mouse.last_cmd, mouse.cmds));
    for (int i = 0; i < 40; i++) begin
      bit l, r, m;
      logic signed [8:0] dx, dy;
      int n_before;
      l = 1'($urandom); r = 1'($urandom); m = 1'($urandom);
      dx = 9'($urandom); dy = 9'($urandom);
      n_before = got;
      if (i == 5) mouse.send_byte(8'h02);          // out of step byte: skipped
      if (i == 9) begin                             // corrupted first byte
        mouse.bad_parity_next = 1;
        mouse.send_byte(8'h08);
        #2000;
        check(got == n_before, "no packet from a parity error");
      end
      mouse.send_packet(l, r, m, dx, dy);
      #2000;
      check(got == n_before + 1, $sformatf("packet %0d delivered", i));
      check(last.left == l && last.right == r && last.middle == m, $sformatf("buttons packet %0d", i));
      check(last.dx == dx && last.dy == dy, $sformatf("movement packet %0d: %0d,%0d vs %0d,%0d", i, last.dx, last.dy, dx, dy));
    end
    check(ready, "still ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
