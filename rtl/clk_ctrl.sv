// clk_ctrl: clock control for the converter and the display.
//
// From the board clock (100 MHz by default) it derives the ADC conversion
// clock and two one-cycle strobes used by the rest of the design, which
// runs entirely on the board clock:
//   sample_en - once per sample period, in the last board cycle before the
//               rising edge of adc_clk, when the converter's output word has
//               been stable for half a period and can be registered;
//   pix_en    - once per VGA pixel period.
// With the defaults both divide by 4: a 25 MHz sample rate, as stated for
// the instrument, and a 25 MHz pixel rate for the 640x480 screen. The
// dividers are this design's choice: the source only names a clock control
// block and a programmable board clock of up to 100 MHz.
// adc_clk is low for the first half of each sample period and high for
// the second half (SAMPLE_DIV must be at least 2).
module clk_ctrl #(
  parameter int unsigned SAMPLE_DIV = 4,
  parameter int unsigned PIX_DIV    = 4
) (
  input  logic clk,
  input  logic rst,
  output logic adc_clk,
  output logic sample_en,
  output logic pix_en
);
  if (SAMPLE_DIV < 2) begin : g_bad_div
    $error("clk_ctrl: SAMPLE_DIV must be at least 2");
  end

  localparam int unsigned SW = (SAMPLE_DIV > 1) ? $clog2(SAMPLE_DIV) : 1;
  localparam int unsigned PW = (PIX_DIV > 1) ? $clog2(PIX_DIV) : 1;

  logic [SW-1:0] s_cnt;
  logic [PW-1:0] p_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      s_cnt <= '0;
      p_cnt <= '0;
    end else begin
      s_cnt <= (s_cnt == SW'(SAMPLE_DIV - 1)) ? '0 : s_cnt + 1'b1;
      p_cnt <= (p_cnt == PW'(PIX_DIV - 1))    ? '0 : p_cnt + 1'b1;
    end
  end

  // Registered clock output: high for counts SAMPLE_DIV/2 .. SAMPLE_DIV-1
  always_ff @(posedge clk) begin
    if (rst) adc_clk <= 1'b0;
    else begin
      logic [SW-1:0] nxt;
      nxt = (s_cnt == SW'(SAMPLE_DIV - 1)) ? '0 : s_cnt + 1'b1;
      adc_clk <= (nxt >= SW'(SAMPLE_DIV / 2));
    end
  end

  assign sample_en = (s_cnt == SW'(SAMPLE_DIV / 2 - 1)) && !rst;
  assign pix_en    = (p_cnt == PW'(PIX_DIV - 1)) && !rst;

endmodule
