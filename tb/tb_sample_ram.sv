// tb_sample_ram: checks the dual-port sample memory at its default size
// (640 x 8). Fills every address, then runs random simultaneous writes
// and reads against a reference array: one-cycle read latency, old data
// returned when reading the address being written, and rd_data held
// while rd_en is low.
module tb_sample_ram;
  localparam int DEPTH = 640;
  logic clk = 0;
  logic we = 0, rd_en = 0;
  logic [9:0] wr_addr = 0, rd_addr = 0;
  logic [7:0] wr_data = 0, rd_data;
  logic [7:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  sample_ram dut (.clk, .we, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data);

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
    logic [7:0] expect_q;
    logic       expect_v;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; wr_addr = 10'(a); wr_data = 8'($urandom); ref_mem[a] = wr_data;
    end
    @(negedge clk); we = 0;
    // read back all
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); rd_en = 1; rd_addr = 10'(a);
      @(negedge clk); rd_en = 0;
      check(rd_data == ref_mem[a], $sformatf("readback %0d: %h vs %h", a, rd_data, ref_mem[a]));
    end
    // random concurrent traffic
    expect_v = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (expect_v) check(rd_data == expect_q, $sformatf("concurrent read: %h vs %h", rd_data, expect_q));
      else if (i > 0) check(rd_data == expect_q, "rd_data held while rd_en low");
      we      = 1'($urandom_range(0, 1));
      wr_addr = 10'($urandom_range(0, DEPTH - 1));
      wr_data = 8'($urandom);
      rd_en   = $urandom_range(0, 2) != 0;
      rd_addr = ($urandom_range(0, 3) == 0) ? wr_addr : 10'($urandom_range(0, DEPTH - 1));
      if (rd_en) expect_q = ref_mem[rd_addr];   // old data on collision
      expect_v = rd_en;
      if (we) ref_mem[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
