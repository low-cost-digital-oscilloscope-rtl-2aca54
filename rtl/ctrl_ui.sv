// ctrl_ui: control unit that turns mouse actions into instrument settings.
//
// The source states that the mouse controls the trigger, the coupling and
// the input scale; how each action maps to a setting is this design's
// choice:
//   vertical movement  - moves the trigger level: the level changes by
//                        dy >> MOVE_SHIFT per packet, saturating at 0 and
//                        2^SAMPLE_W - 1;
//   left button press  - steps the input scale selector 0,1,..,3,0,...
//                        (the 2-bit select of the range multiplexer);
//   right button press - toggles DC/AC coupling.
// A press is a button that is down in this packet and was up in the
// previous one, so holding a button does not repeat. Settings change the
// cycle after pkt_valid and are held in registers; after reset the level
// is mid-scale, the coupling DC and the scale 0.
module ctrl_ui
  import osc_pkg::*;
#(
  parameter int unsigned MOVE_SHIFT = 0
) (
  input  logic       clk,
  input  logic       rst,
  input  mouse_pkt_t pkt,
  input  logic       pkt_valid,
  output settings_t  settings
);
  logic prev_left, prev_right;

  always_ff @(posedge clk) begin
    if (rst) begin
      settings.trig_level <= SAMPLE_W'(1 << (SAMPLE_W - 1));
      settings.coupling   <= COUPLING_DC;
      settings.scale_sel  <= 2'd0;
      prev_left           <= 1'b0;
      prev_right          <= 1'b0;
    end else if (pkt_valid) begin
      logic signed [SAMPLE_W+1:0] lvl;
      lvl = $signed({2'b00, settings.trig_level}) + (SAMPLE_W+2)'($signed(pkt.dy) >>> MOVE_SHIFT);
      if (lvl < 0)                            settings.trig_level <= '0;
      else if (lvl > (1 << SAMPLE_W) - 1)     settings.trig_level <= '1;
      else                                    settings.trig_level <= lvl[SAMPLE_W-1:0];
      if (pkt.left && !prev_left)   settings.scale_sel <= settings.scale_sel + 2'd1;
      if (pkt.right && !prev_right) settings.coupling  <= (settings.coupling == COUPLING_DC) ? COUPLING_AC : COUPLING_DC;
      prev_left  <= pkt.left;
      prev_right <= pkt.right;
    end
  end

endmodule
