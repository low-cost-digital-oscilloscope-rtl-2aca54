// osc_pkg: constants and types shared by the oscilloscope blocks.
//
// The screen is a 640x480 VGA display and the record holds one 8-bit
// sample per horizontal pixel, so 640 samples. The VGA porch and sync
// lengths are the common 640x480 at 60 Hz values (800 x 525 total); the
// 2-bit-per-colour RGB bus (64 colours) follows the board's resistor DAC.
// The mouse packet layout is the standard PS/2 mouse stream format.
package osc_pkg;

  // Display geometry
  localparam int unsigned H_ACTIVE = 640;
  localparam int unsigned H_FP     = 16;
  localparam int unsigned H_SYNC   = 96;
  localparam int unsigned H_BP     = 48;
  localparam int unsigned V_ACTIVE = 480;
  localparam int unsigned V_FP     = 10;
  localparam int unsigned V_SYNC   = 2;
  localparam int unsigned V_BP     = 33;

  // Sample record: one sample per horizontal pixel
  localparam int unsigned SAMPLE_W = 8;
  localparam int unsigned REC_DEPTH = H_ACTIVE;

  // 2 bits per colour component, 6 bits = 64 colours
  typedef struct packed {
    logic [1:0] r;
    logic [1:0] g;
    logic [1:0] b;
  } rgb_t;

  localparam rgb_t COLOR_BG    = '{r: 2'd0, g: 2'd0, b: 2'd0};
  localparam rgb_t COLOR_TRACE = '{r: 2'd3, g: 2'd3, b: 2'd0};

  // Decoded PS/2 mouse packet
  typedef struct packed {
    logic             left;
    logic             right;
    logic             middle;
    logic signed [8:0] dx;   // positive = to the right
    logic signed [8:0] dy;   // positive = away from the user (up)
  } mouse_pkt_t;

  // Analog front-end settings driven by the control unit
  typedef enum logic {COUPLING_DC = 1'b0, COUPLING_AC = 1'b1} coupling_e;

  typedef struct packed {
    logic [SAMPLE_W-1:0] trig_level;
    coupling_e           coupling;
    logic [1:0]          scale_sel;
  } settings_t;

endpackage
