// adc_model: behavioural model of the 8-bit video-rate ADC (not
// synthesizable logic; it stands for the external converter chip).
//
// The converter accepts an input between VIN_LO = 1.5 V and VIN_HI = 3.5 V
// (the range the source gives; the analog front end shifts the probe
// signal into it) and produces an 8-bit code, straight binary or two's
// complement as selected by twos_comp (the source mentions both formats).
// The input is sampled on each rising edge of clk and the code appears
// on dout LATENCY rising edges later, changing right at the edge.
//   code = clamp(floor((vin - VIN_LO) / (VIN_HI - VIN_LO) * 256), 0, 255)
// The pipeline latency (5 clocks) and the edge on which data changes are
// assumptions of this model, not values from the source.
module adc_model #(
  parameter real         VIN_LO  = 1.5,
  parameter real         VIN_HI  = 3.5,
  parameter int unsigned LATENCY = 5
) (
  input  logic       clk,
  input  real        vin,
  input  logic       twos_comp,
  output logic [7:0] dout
);
  logic [7:0] pipe [LATENCY];

  function automatic logic [7:0] quantise(input real v);
    real    frac;
    integer code;
    frac = (v - VIN_LO) / (VIN_HI - VIN_LO) * 256.0;
    code = $rtoi(frac);
    if (frac < 0.0) code = 0;
    if (code > 255) code = 255;
    return 8'(code);
  endfunction

  initial foreach (pipe[i]) pipe[i] = 8'h80;

  always @(posedge clk) begin
    pipe[0] <= quantise(vin);
    for (int i = 1; i < LATENCY; i++) pipe[i] <= pipe[i-1];
  end

  assign dout = twos_comp ? {~pipe[LATENCY-1][7], pipe[LATENCY-1][6:0]} : pipe[LATENCY-1];

endmodule
