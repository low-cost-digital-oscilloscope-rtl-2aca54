// osc_top: FPGA part of the low-cost digital oscilloscope.
//
// Data flow (all on the board clock, 100 MHz by default):
//   ADC pins -> input register -> trigger  -> capture_ctrl -> sample_ram
//                                 \____________________^        |
//   image_gen <- sample_ram read port <--------------------------'
//   image_gen -> VGA pins (2 bits per colour, hsync, vsync)
//   PS/2 pins -> mouse_if -> ctrl_ui -> trigger level, coupling and scale
//                                       outputs to the analog front end
// clk_ctrl generates the converter clock (adc_clk, 25 MHz) and the sample
// and pixel strobes. The converter's output word is registered every board
// cycle and taken at sample_en, the last cycle before adc_clk rises, about
// half a sample period after the word last changed. A record of 640 samples, one
// per screen column, is written from address 0 when the trigger fires and
// is shown until it has been displayed for a whole frame, then the trigger
// is re-armed. The block structure (trigger, memory with its manager, image
// generator, control and mouse interface, clock control) follows the
// source; the internal choices are described in each block.
//
// The analog stage (low-pass filter, limiter, scale selector, level
// shifter), the converter itself and the VGA resistor DAC are outside the
// FPGA: coupling_ac and scale_sel drive the front end's switches, rgb drives
// the resistor DAC, and the PS/2 lines need open-drain buffers driven by
// ps2_*_low.
module osc_top
  import osc_pkg::*;
#(
  parameter int unsigned SAMPLE_DIV     = 4,
  parameter int unsigned PIX_DIV        = 4,
  parameter int unsigned INHIBIT_CYCLES = 10000,
  parameter int unsigned RX_TIMEOUT     = 20000
) (
  input  logic                clk,
  input  logic                rst,
  // converter
  input  logic [SAMPLE_W-1:0] adc_data,
  output logic                adc_clk,
  // analog front-end control
  output logic                coupling_ac,
  output logic [1:0]          scale_sel,
  // VGA
  output rgb_t                rgb,
  output logic                hsync_n,
  output logic                vsync_n,
  // PS/2 mouse (open collector)
  input  logic                ps2_clk_i,
  input  logic                ps2_data_i,
  output logic                ps2_clk_low,
  output logic                ps2_data_low
);
  localparam int unsigned AW = $clog2(REC_DEPTH);

  logic sample_en, pix_en;

  clk_ctrl #(.SAMPLE_DIV(SAMPLE_DIV), .PIX_DIV(PIX_DIV)) u_clk (
    .clk, .rst, .adc_clk, .sample_en, .pix_en
  );

  // Input register for the converter's output word
  logic [SAMPLE_W-1:0] adc_q;
  always_ff @(posedge clk) adc_q <= adc_data;

  // Control: mouse and settings
  mouse_pkt_t pkt;
  logic       pkt_valid, mouse_ready;
  settings_t  settings;

  mouse_if #(.INHIBIT_CYCLES(INHIBIT_CYCLES), .RX_TIMEOUT(RX_TIMEOUT)) u_mouse (
    .clk, .rst, .ps2_clk_i, .ps2_data_i, .ps2_clk_low, .ps2_data_low,
    .ready(mouse_ready), .pkt, .pkt_valid
  );

  ctrl_ui u_ctrl (.clk, .rst, .pkt, .pkt_valid, .settings);

  assign coupling_ac = (settings.coupling == COUPLING_AC);
  assign scale_sel   = settings.scale_sel;

  // Trigger and memory manager
  logic trig, frame_start;
  logic we, armed, writing;
  logic [AW-1:0] wr_addr;
  logic [SAMPLE_W-1:0] wr_data;
  logic [15:0] captures;

  trigger u_trig (
    .clk, .rst, .sample_en, .sample(adc_q), .trig_level(settings.trig_level), .trig
  );

  capture_ctrl #(.DEPTH(REC_DEPTH)) u_cap (
    .clk, .rst, .sample_en, .sample(adc_q), .trig, .frame_start,
    .we, .wr_addr, .wr_data, .armed, .writing, .captures
  );

  // Dual-port sample memory
  logic                rd_en;
  logic [AW-1:0]       rd_addr;
  logic [SAMPLE_W-1:0] rd_data;

  sample_ram #(.DEPTH(REC_DEPTH), .WIDTH(SAMPLE_W)) u_ram (
    .clk, .we, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data
  );

  // Image generation
  image_gen #(.DEPTH(REC_DEPTH)) u_img (
    .clk, .rst, .pix_en, .rd_en, .rd_addr, .rd_data,
    .rgb, .hsync_n, .vsync_n, .frame_start
  );

endmodule
