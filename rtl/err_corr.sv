// err_corr: real-time correction of offset and gain errors.
//
// Every raw ADC sample is corrected as
//     y = ((x - offset) * gain) >>> GAIN_FRAC
// where `offset` is the residual offset left by the self-calibration (in ADC
// codes) and `gain` an unsigned gain coefficient with GAIN_FRAC fractional
// bits (1.0 = 2**GAIN_FRAC).  The output is two bits wider than the input so
// that neither the subtraction nor a gain below 2.0 can overflow; the shift
// rounds towards minus infinity.  One register stage: `y_valid` follows
// `x_valid` by one clock.
//
// That offset and gain are corrected in real time from stored calibration
// values follows the instrument description; the arithmetic, the
// coefficient format and the latency are this design's choices.
module err_corr #(
  parameter int unsigned ADC_W     = fdi_pkg::ADC_W,
  parameter int unsigned GAIN_W    = 16,
  parameter int unsigned GAIN_FRAC = 15
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic signed [ADC_W-1:0]   x,
  input  logic                      x_valid,
  input  logic signed [ADC_W-1:0]   offset,
  input  logic        [GAIN_W-1:0]  gain,
  output logic signed [ADC_W+1:0]   y,
  output logic                      y_valid
);

  localparam int unsigned PW = ADC_W + 1 + GAIN_W + 1;

  logic signed [ADC_W:0]  diff;
  logic signed [PW-1:0]   prod;
  logic signed [PW-1:0]   shifted;

  always_comb begin
    diff    = (ADC_W+1)'(x) - (ADC_W+1)'(offset);
    prod    = PW'(diff) * signed'(PW'({1'b0, gain}));
    shifted = prod >>> GAIN_FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= x_valid;
      if (x_valid) y <= shifted[ADC_W+1:0];
    end
  end

endmodule
