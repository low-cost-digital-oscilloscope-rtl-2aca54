// trigger: level trigger on the ADC sample stream.
//
// Every sample_en the incoming sample is compared with the previous one.
// The trigger fires (trig, one board cycle, aligned with the sample_en of
// the crossing sample) when the signal rises through the level: the previous
// sample was below trig_level and the current one is at or above it. The
// source names a trigger block controlled from the mouse; the rising-edge
// level crossing is this design's choice of how it decides. The first
// sample after reset never fires, since it has no predecessor.
module trigger
  import osc_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                sample_en,
  input  logic [SAMPLE_W-1:0] sample,
  input  logic [SAMPLE_W-1:0] trig_level,
  output logic                trig
);
  logic [SAMPLE_W-1:0] prev;
  logic                prev_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      prev       <= '0;
      prev_valid <= 1'b0;
    end else if (sample_en) begin
      prev       <= sample;
      prev_valid <= 1'b1;
    end
  end

  assign trig = sample_en && prev_valid && (prev < trig_level) && (sample >= trig_level);

endmodule
