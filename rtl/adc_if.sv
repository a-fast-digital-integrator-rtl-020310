// adc_if: conversion control and read-out of the 18-bit sampling ADC.
//
// A divider started by `en` produces one conversion start every `sample_div`
// clocks (25 clocks of the 20 MHz board clock give 800 kS/s, a 1.25 us
// sampling period).  The converter answers with `adc_busy`; the parallel
// output word `adc_data` is captured on the falling edge of `adc_busy` and
// presented as a signed two's-complement `sample` with a one-clock
// `sample_valid` strobe, two clocks after `adc_busy` falls.  A sample equal
// to the most positive or most negative code raises `ovr` with it.  A start
// tick that arrives while a conversion is still busy is skipped and
// reported on `miss`.
//
// The resolution and the sampling rate follow the instrument description.
// The start/busy/parallel-data handshake, the active-high start pulse and the
// two's-complement output coding are this design's choices.
module adc_if #(
  parameter int unsigned ADC_W = fdi_pkg::ADC_W,
  parameter int unsigned DIV_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,          // acquisition running
  input  logic [DIV_W-1:0]        sample_div,  // clocks per sample, >= 2
  // converter side
  output logic                    adc_cnvst,   // one-clock start pulse
  input  logic                    adc_busy,
  input  logic [ADC_W-1:0]        adc_data,
  // sample side
  output logic signed [ADC_W-1:0] sample,
  output logic                    sample_valid,
  output logic                    ovr,
  output logic                    miss
);

  localparam logic signed [ADC_W-1:0] MAX_CODE = {1'b0, {(ADC_W-1){1'b1}}};
  localparam logic signed [ADC_W-1:0] MIN_CODE = {1'b1, {(ADC_W-1){1'b0}}};

  logic [DIV_W-1:0] div_cnt;
  logic             tick;
  logic             busy_q;     // registered busy
  logic             in_conv;    // a conversion is outstanding
  logic             busy_fall;

  assign tick      = en && (div_cnt == '0);
  assign busy_fall = busy_q && !adc_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt      <= '0;
      busy_q       <= 1'b0;
      in_conv      <= 1'b0;
      adc_cnvst    <= 1'b0;
      sample       <= '0;
      sample_valid <= 1'b0;
      ovr          <= 1'b0;
      miss         <= 1'b0;
    end else begin
      busy_q       <= adc_busy;
      adc_cnvst    <= 1'b0;
      sample_valid <= 1'b0;
      ovr          <= 1'b0;
      miss         <= 1'b0;
      if (!en) begin
        div_cnt <= '0;
      end else if (div_cnt >= sample_div - 1'b1) begin
        div_cnt <= '0;
      end else begin
        div_cnt <= div_cnt + 1'b1;
      end
      if (tick) begin
        if (in_conv) begin
          miss <= 1'b1;
        end else begin
          adc_cnvst <= 1'b1;
          in_conv   <= 1'b1;
        end
      end
      if (in_conv && busy_fall) begin
        in_conv      <= 1'b0;
        sample       <= signed'(adc_data);
        sample_valid <= 1'b1;
        ovr          <= (signed'(adc_data) == MAX_CODE) || (signed'(adc_data) == MIN_CODE);
      end
    end
  end

endmodule
