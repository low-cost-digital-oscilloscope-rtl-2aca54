// tb_image_gen: checks the waveform drawing at full 640x480 size.
// A test memory (one-cycle read latency, like the sample memory) holds a
// record with slow ramps, flat parts and large jumps. For every pixel of
// one whole frame the expected colour is computed independently:
//   row(s) = 479 - floor(s * 480 / 256)
//   lit(x, y) = y between row(mem[x-1]) and row(mem[x]) (x = 0: row(mem[0]))
// and compared with rgb two pixel periods later, together with hsync_n
// (low for pixels 656..751) and vsync_n (low for lines 490..491), which
// must come out with the same delay.
module tb_image_gen;
  import osc_pkg::*;
  logic clk = 0, rst = 1, pix_en = 0;
  logic rd_en;
  logic [9:0] rd_addr;
  logic [7:0] rd_data;
  rgb_t rgb;
  logic hsync_n, vsync_n, frame_start;
  logic [7:0] mem [640];
  int checks = 0, failures = 0, lit_cnt = 0;

  image_gen dut (.clk, .rst, .pix_en, .rd_en, .rd_addr, .rd_data,
                 .rgb, .hsync_n, .vsync_n, .frame_start);

  always_ff @(posedge clk) if (rd_en) rd_data <= mem[rd_addr];

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  function automatic int row(input int s);
    return 479 - (s * 480) / 256;
  endfunction

  initial begin
    #30000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 640; i++) begin
      if (i < 200)      mem[i] = 8'(i);                  // ramp
      else if (i < 300) mem[i] = (i % 50 < 25) ? 8'd0 : 8'd255; // square, full-scale jumps
      else if (i < 400) mem[i] = 8'd128;                  // flat
      else              mem[i] = 8'($urandom);
    end
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    // pixel index = y*800 + x; the timing generator shows pixel 0 right after
    // reset, and each pixel reaches the outputs two strobes after it is current
    for (int k = 0; k < 800 * 525 + 2; k++) begin
      @(negedge clk); pix_en = 1;
      @(negedge clk); pix_en = 0;
      if (k >= 1) begin
        int p, x, y, lo, hi, r0, r1;
        bit exp_lit;
        p = k - 1;                 // pixel 0 is current right after reset, so
                                   // after strobe number k+1 the output is pixel k-1
        x = p % 800; y = p / 800;
        exp_lit = 0;
        if (x < 640 && y < 480) begin
          r1 = row(int'(mem[x]));
          r0 = (x == 0) ? r1 : row(int'(mem[x-1]));
          lo = (r0 < r1) ? r0 : r1;
          hi = (r0 < r1) ? r1 : r0;
          exp_lit = (y >= lo) && (y <= hi);
        end
        if (exp_lit) lit_cnt++;
        check(rgb == (exp_lit ? COLOR_TRACE : COLOR_BG),
              $sformatf("pixel %0d,%0d colour %h expected lit=%0d", x, y, rgb, exp_lit));
        check(hsync_n == !(x >= 656 && x < 752), $sformatf("hsync at %0d,%0d", x, y));
        check(vsync_n == !(y >= 490 && y < 492), $sformatf("vsync at %0d,%0d", x, y));
      end
    end
    check(lit_cnt > 640 * 2, $sformatf("lit pixels %0d", lit_cnt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
