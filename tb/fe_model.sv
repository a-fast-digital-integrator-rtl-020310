// fe_model: behavioural model of the analog front end and the 18-bit ADC,
// for simulation only (not synthesizable).
//
// The ADC output for the selected input is
//   code = round( vin * gain(pot) + OFFSET_ERR + (dac - 32768) * DAC_LSB )
// saturated to 18-bit two's complement, where vin is 0 for the shorted
// input, `vref` for the reference and `coil` (in ADC codes at unit gain) for
// the coil, and gain(pot) = GAIN_MIN + (GAIN_MAX - GAIN_MIN) * pot / 65536.
// The output therefore rises with both the offset DAC code and the gain
// potentiometer code.  A one-clock `cnvst` pulse starts a conversion: `busy`
// rises in the next clock, stays high CONV_CLKS clocks and falls with the
// new word on `data`.  The converted value is the one at the start pulse.
module fe_model #(
  parameter real OFFSET_ERR = 1234.0,
  parameter real DAC_LSB    = 0.25,
  parameter real GAIN_MIN   = 0.9,
  parameter real GAIN_MAX   = 1.2,
  parameter int  CONV_CLKS  = 10
) (
  input  logic        clk,
  input  logic [1:0]  in_sel,
  input  logic [15:0] dac_code,
  input  logic [15:0] pot_code,
  input  real         coil,
  input  real         vref,
  input  logic        cnvst,
  output logic        busy,
  output logic [17:0] data
);

  int conv_cnt;
  logic [17:0] pending;

  initial begin
    busy = 1'b0;
    data = '0;
    conv_cnt = 0;
    pending = '0;
  end

  function automatic logic [17:0] convert(input logic [1:0] sel, input logic [15:0] dac,
                                          input logic [15:0] pot, input real c);
    real vin, g, v;
    longint q;
    case (sel)
      2'd1:    vin = 0.0;
      2'd2:    vin = vref;
      default: vin = c;
    endcase
    g = GAIN_MIN + (GAIN_MAX - GAIN_MIN) * real'(pot) / 65536.0;
    v = vin * g + OFFSET_ERR + (real'(dac) - 32768.0) * DAC_LSB;
    q = longint'(v);
    if (q > 131071)  q = 131071;
    if (q < -131072) q = -131072;
    return q[17:0];
  endfunction

  always @(posedge clk) begin
    if (cnvst && conv_cnt == 0) begin
      pending  <= convert(in_sel, dac_code, pot_code, coil);
      busy     <= 1'b1;
      conv_cnt <= CONV_CLKS;
    end else if (conv_cnt > 0) begin
      conv_cnt <= conv_cnt - 1;
      if (conv_cnt == 1) begin
        busy <= 1'b0;
        data <= pending;
      end
    end
  end

endmodule
