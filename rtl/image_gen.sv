// image_gen: draws the stored record on the VGA screen.
//
// Column x of the screen shows sample x of the memory (640 columns, 640
// samples). For each pixel the sample is read from the memory's read port
// and mapped to a screen row, larger values higher up:
//     row(s) = VA-1 - (s * VA) / 2^SAMPLE_W       (0 -> 479, 255 -> 1)
// A pixel is painted in the trace colour when its line lies between the
// row of the previous column's sample and the row of this column's sample,
// so steep edges appear as connected vertical strokes instead of isolated
// dots; everything else is background. The column-per-sample mapping is
// from the source; the row scaling, the joining of neighbouring samples and
// the colours are this design's choices.
//
// Timing: the memory is read with rd_en = pix_en and one cycle of latency,
// and the pixel colour and both sync signals leave through the same two
// pixel-period pipeline, so rgb, hsync_n and vsync_n stay aligned.
// frame_start comes straight from the timing generator.
module image_gen
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
  parameter int unsigned DEPTH = HA,
  localparam int unsigned AW = $clog2(DEPTH),
  localparam int unsigned XW = $clog2(HA + HFP + HS + HBP),
  localparam int unsigned YW = $clog2(VA + VFP + VS + VBP)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                pix_en,
  // memory read port
  output logic                rd_en,
  output logic [AW-1:0]       rd_addr,
  input  logic [SAMPLE_W-1:0] rd_data,
  // VGA outputs
  output rgb_t                rgb,
  output logic                hsync_n,
  output logic                vsync_n,
  output logic                frame_start
);
  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic          active, hs_n, vs_n;

  vga_timing #(
    .HA(HA), .HFP(HFP), .HS(HS), .HBP(HBP),
    .VA(VA), .VFP(VFP), .VS(VS), .VBP(VBP)
  ) u_timing (
    .clk, .rst, .pix_en,
    .x, .y, .active,
    .hsync_n(hs_n), .vsync_n(vs_n), .frame_start
  );

  assign rd_en   = pix_en;
  assign rd_addr = (32'(x) < DEPTH) ? AW'(x) : '0;

  // Stage B: timing of the pixel whose sample is in rd_data
  logic [XW-1:0] b_x;
  logic [YW-1:0] b_y;
  logic          b_active, b_hs_n, b_vs_n;
  logic [YW-1:0] prev_row;

  function automatic logic [YW-1:0] row_of(input logic [SAMPLE_W-1:0] s);
    logic [SAMPLE_W+YW-1:0] prod;
    prod = (SAMPLE_W+YW)'(s) * (SAMPLE_W+YW)'(VA);
    return YW'(VA - 1) - YW'(prod >> SAMPLE_W);
  endfunction

  logic [YW-1:0] cur_row, lo, hi;
  logic          lit;

  always_comb begin
    logic [YW-1:0] p;
    cur_row = row_of(rd_data);
    p       = (b_x == '0) ? cur_row : prev_row;
    lo      = (p < cur_row) ? p : cur_row;
    hi      = (p < cur_row) ? cur_row : p;
    lit     = b_active && (b_y >= lo) && (b_y <= hi);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      b_x      <= '0;
      b_y      <= '0;
      b_active <= 1'b0;
      b_hs_n   <= 1'b1;
      b_vs_n   <= 1'b1;
      prev_row <= '0;
      rgb      <= COLOR_BG;
      hsync_n  <= 1'b1;
      vsync_n  <= 1'b1;
    end else if (pix_en) begin
      b_x      <= x;
      b_y      <= y;
      b_active <= active;
      b_hs_n   <= hs_n;
      b_vs_n   <= vs_n;
      prev_row <= cur_row;
      rgb      <= lit ? COLOR_TRACE : COLOR_BG;
      hsync_n  <= b_hs_n;
      vsync_n  <= b_vs_n;
    end
  end

endmodule
