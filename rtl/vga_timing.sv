// vga_timing: horizontal and vertical synchronism for a 640x480 screen.
//
// Two counters advance once per pix_en: x counts the pixels of a line
// (H_ACTIVE visible, then front porch, sync, back porch) and y counts the
// lines of a frame the same way. hsync_n and vsync_n are low during the
// sync intervals (the negative polarity that monitors expect for
// 640x480 at 60 Hz). active is high for visible pixels. frame_start pulses
// for one board cycle when the first line of vertical blanking begins,
// i.e. right after the last visible pixel of a frame has been counted.
// All outputs are registered and belong to the same pixel. The 640x480
// size is from the source; the porch and sync lengths are the usual
// VESA values for a 25 MHz pixel clock, this design's choice.
module vga_timing
  import osc_pkg::*;
#(
  parameter int unsigned HA  = H_ACTIVE,
  parameter int unsigned HFP = H_FP,
  parameter int unsigned HS  = H_SYNC,
  parameter int unsigned HBP = H_BP,
  parameter int unsigned VA  = V_ACTIVE,
  parameter int unsigned VFP = V_FP,
  parameter int unsigned VS  = V_SYNC,
  parameter int unsigned VBP = V_BP,
  localparam int unsigned HT = HA + HFP + HS + HBP,
  localparam int unsigned VT = VA + VFP + VS + VBP,
  localparam int unsigned XW = $clog2(HT),
  localparam int unsigned YW = $clog2(VT)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          pix_en,
  output logic [XW-1:0] x,
  output logic [YW-1:0] y,
  output logic          active,
  output logic          hsync_n,
  output logic          vsync_n,
  output logic          frame_start
);
  logic [XW-1:0] x_nxt;
  logic [YW-1:0] y_nxt;

  always_comb begin
    x_nxt = x;
    y_nxt = y;
    if (x == XW'(HT - 1)) begin
      x_nxt = '0;
      y_nxt = (y == YW'(VT - 1)) ? '0 : y + 1'b1;
    end else begin
      x_nxt = x + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x           <= '0;
      y           <= '0;
      active      <= 1'b1;
      hsync_n     <= 1'b1;
      vsync_n     <= 1'b1;
      frame_start <= 1'b0;
    end else begin
      frame_start <= 1'b0;
      if (pix_en) begin
        x       <= x_nxt;
        y       <= y_nxt;
        active  <= (32'(x_nxt) < HA) && (32'(y_nxt) < VA);
        hsync_n <= !((32'(x_nxt) >= HA + HFP) && (32'(x_nxt) < HA + HFP + HS));
        vsync_n <= !((32'(y_nxt) >= VA + VFP) && (32'(y_nxt) < VA + VFP + VS));
        frame_start <= (32'(y_nxt) == VA) && (x_nxt == '0);
      end
    end
  end

endmodule
