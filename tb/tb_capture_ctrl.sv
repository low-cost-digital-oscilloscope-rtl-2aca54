// tb_capture_ctrl: checks the memory write manager with a 16-word record.
// Random sample strobes, samples, trigger pulses and frame_start pulses
// are driven; a reference model written from the rules (first write of
// the triggering sample at address 0, then one write per sample strobe at
// consecutive addresses up to the end, then no writes and no reaction to
// the trigger until REARM_FRAMES frame starts have passed) predicts every
// write. Also checks the captured record word by word and that the
// capture counter, armed and writing outputs agree with the model.
module tb_capture_ctrl;
  localparam int DEPTH = 16, REARM = 2;
  logic clk = 0, rst = 1;
  logic sample_en = 0, trig = 0, frame_start = 0;
  logic [7:0] sample = 0;
  logic we, armed, writing;
  logic [3:0] wr_addr;
  logic [7:0] wr_data;
  logic [15:0] captures;
  int checks = 0, failures = 0;

  capture_ctrl #(.DEPTH(DEPTH), .REARM_FRAMES(REARM)) dut (
    .clk, .rst, .sample_en, .sample, .trig, .frame_start,
    .we, .wr_addr, .wr_data, .armed, .writing, .captures);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  int m_state = 0;   // 0 armed, 1 write, 2 hold
  int m_addr = 0, m_frames = 0, m_caps = 0, ignored_trig = 0;
  bit e_we; int e_addr; logic [7:0] e_data;
  logic [7:0] rec [DEPTH];

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    e_we = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      // compare outputs produced by the previous cycle's inputs
      check(we == e_we, $sformatf("we %0d vs %0d at %0d", we, e_we, i));
      if (e_we) begin
        check(wr_addr == 4'(e_addr) && wr_data == e_data, "write address/data");
        rec[wr_addr] = wr_data;
      end
      check(armed == (m_state == 0) && writing == (m_state == 1), "state outputs");
      check(captures == 16'(m_caps), "capture count");
      // new inputs
      sample_en   = $urandom_range(0, 2) == 0;
      sample      = 8'($urandom);
      trig        = sample_en && ($urandom_range(0, 9) == 0);
      frame_start = !sample_en && ($urandom_range(0, 40) == 0);
      // model the next cycle
      e_we = 0;
      case (m_state)
        0: if (sample_en && trig) begin
             e_we = 1; e_addr = 0; e_data = sample; m_addr = 1; m_state = 1;
           end
        1: begin
             if (trig) ignored_trig++;
             if (sample_en) begin
               e_we = 1; e_addr = m_addr; e_data = sample;
               if (m_addr == DEPTH - 1) begin m_state = 2; m_frames = 0; m_caps++; end
               else m_addr++;
             end
           end
        default: begin
             if (trig) ignored_trig++;
             if (frame_start) begin
               m_frames++;
               if (m_frames >= REARM) m_state = 0;
             end
           end
      endcase
    end
    check(m_caps > 20, $sformatf("records captured: %0d", m_caps));
    check(ignored_trig > 20, "triggers while busy were exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
