// capture_ctrl: manager of the sample memory's write side.
//
// The source's rule: when the trigger says so, the samples are written one
// after another from address 0 to the end of the memory (one per screen
// column), so that the image generator can read the whole record for every
// line it draws. This module implements that with three states:
//   ARMED - waiting; the sample that makes the trigger fire is written to
//           address 0;
//   WRITE - every following sample_en writes the next address, up to
//           DEPTH-1;
//   HOLD  - the record is complete and is left untouched while the screen
//           shows it. After REARM_FRAMES frame_start pulses (start of the
//           vertical blanking) it goes back to ARMED. With the default of 2
//           the finished record is shown for at least one whole frame.
// The hold-and-re-arm policy is this design's choice. Write outputs are
// registered: we/wr_addr/wr_data are valid the cycle after the sample_en
// they belong to. captures counts completed records (wraps).
module capture_ctrl
  import osc_pkg::*;
#(
  parameter int unsigned DEPTH        = 640,
  parameter int unsigned REARM_FRAMES = 2,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                sample_en,
  input  logic [SAMPLE_W-1:0] sample,
  input  logic                trig,
  input  logic                frame_start,
  output logic                we,
  output logic [AW-1:0]       wr_addr,
  output logic [SAMPLE_W-1:0] wr_data,
  output logic                armed,
  output logic                writing,
  output logic [15:0]         captures
);
  typedef enum logic [1:0] {S_ARMED, S_WRITE, S_HOLD} state_e;
  state_e state;

  logic [AW-1:0] addr;
  logic [$clog2(REARM_FRAMES + 1)-1:0] frames;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_ARMED;
      addr     <= '0;
      frames   <= '0;
      we       <= 1'b0;
      wr_addr  <= '0;
      wr_data  <= '0;
      captures <= '0;
    end else begin
      we <= 1'b0;
      unique case (state)
        S_ARMED: begin
          if (sample_en && trig) begin
            we      <= 1'b1;
            wr_addr <= '0;
            wr_data <= sample;
            addr    <= AW'(1);
            state   <= S_WRITE;
          end
        end
        S_WRITE: begin
          if (sample_en) begin
            we      <= 1'b1;
            wr_addr <= addr;
            wr_data <= sample;
            if (addr == AW'(DEPTH - 1)) begin
              state    <= S_HOLD;
              frames   <= '0;
              captures <= captures + 1'b1;
            end else begin
              addr <= addr + 1'b1;
            end
          end
        end
        S_HOLD: begin
          if (frame_start) begin
            if (32'(frames) + 1 >= REARM_FRAMES) state <= S_ARMED;
            frames <= frames + 1'b1;
          end
        end
        default: state <= S_ARMED;
      endcase
    end
  end

  assign armed   = (state == S_ARMED);
  assign writing = (state == S_WRITE);

  // A trigger may only start a record from the ARMED state, and writes
  // never go past the end of the memory.
  a_addr_in_range: assert property (@(posedge clk) disable iff (rst)
    we |-> (32'(wr_addr) < DEPTH));

endmodule
