// fdi_top: FPGA of the fast digital integrator for rotating-coil flux
// measurements.
//
// The coil voltage goes through a programmable-gain amplifier into an 18-bit
// ADC sampling at up to 800 kS/s.  This FPGA starts the conversions, corrects
// each sample for offset and gain, sums the samples between consecutive
// rising edges of the encoder trigger and buffers one flux increment (sum and
// number of samples) per trigger for the host.  It also runs the instrument
// state machine (bootstrap, ready, configuration, self-calibration,
// measurement, recovery), the dichotomic self-calibration that sets the
// 16-bit offset DAC and the 16-bit gain potentiometer, the PGA range control
// and the local-bus registers.
//
// Data path:  adc_if -> err_corr -> flux_integrator -> flux_fifo -> bus_regs
// Control:    bus_regs (commands) -> fdi_ctrl -> self_cal / pga_ctrl /
//             measurement arm;  trig_detect (encoder pulses and zero
//             pulse, one instance each) -> flux_integrator;
//             local_io makes the board reset and drives the indicators.
//
// The analog parts (amplifier, ADC, offset DAC, reference with its
// programmable divider), the signal processor and the calibration memory are
// outside; their signals are ports.  `dev_ready` stands for the report that
// all devices finished initialising and `dsp_err` for the processor's error
// code.  The ADC runs during self-calibration and measurement only.
// The host sees the registers of bus_regs; a measurement is: write RANGE,
// SAMPLE_DIV, N_POINTS, GAIN, command CONFIG, command SELF_CAL, command
// MEASURE, then read FLUX_LO / FLUX_HI / FLUX_N for each increment.
//
// The partition into these blocks and their functions follow the instrument
// description; where this RTL carries out work the description gives to the
// signal processor (the integration), that is this design's choice, as are
// all parameter values not stated below.
//   FIFO_DEPTH   512 flux increments (one turn of 512 points)
//   CAL_SETTLE   analog settling clocks per calibration trial
//   PGA_SETTLE   settling clocks after a range change
//   TRIG_FILT    trigger glitch filter length
//   BOOT_TIMEOUT clocks allowed for device initialisation
//   DEBOUNCE, STRETCH  reset button debounce, indicator stretch
module fdi_top
  import fdi_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH   = 512,
  parameter int unsigned CAL_SETTLE   = 64,
  parameter int unsigned PGA_SETTLE   = 1000,
  parameter int unsigned TRIG_FILT    = 4,
  parameter int unsigned BOOT_TIMEOUT = 1_000_000,
  parameter int unsigned DEBOUNCE     = 20_000,
  parameter int unsigned STRETCH      = 2_000_000
) (
  input  logic               clk,
  input  logic               por_n,
  input  logic               on_sw,
  input  logic               btn_reset_n,
  // ADC
  output logic               adc_cnvst,
  input  logic               adc_busy,
  input  logic [ADC_W-1:0]   adc_data,
  // analog front-end control
  output in_sel_e            in_sel,
  output logic [CAL_W-1:0]   dac_code,
  output logic [CAL_W-1:0]   pot_code,
  output logic [3:0]         pga_gain,
  output logic [3:0]         vref_sel,
  // encoder: angular trigger pulses and zero (index) pulse
  input  logic               trig_in,
  input  logic               index_in,
  // processor and devices
  input  logic               dev_ready,
  input  logic [7:0]         dsp_err,
  // local bus
  input  logic [3:0]         bus_addr,
  input  logic               bus_wr,
  input  logic [BUS_W-1:0]   bus_wdata,
  input  logic               bus_rd,
  output logic [BUS_W-1:0]   bus_rdata,
  output logic               bus_rvalid,
  // interrupts and indicators
  output logic               adc_irq,
  output logic               fpga_irq,
  output logic               prio0_irq,
  output logic               led_ovr,
  output logic               led_err,
  output state_e             inst_state
);

  localparam int unsigned FCW = $clog2(FIFO_DEPTH + 1);

  logic rst_n;

  // control
  logic        cmd_valid;
  cmd_e        cmd;
  status_t     status;
  logic        cfg_apply, cfg_ok, cfg_err, pga_settling;
  logic        cal_start, cal_busy, cal_done, cal_err;
  logic [1:0]  cal_err_step;
  logic        meas_start, meas_arm, meas_done;
  logic [3:0]  range_req;
  logic [16:0] fs_mv;
  logic [15:0] sample_div, gain;
  logic [CNT_W-1:0] n_points;
  logic        use_index;
  logic [31:0] cal_period;

  // data path
  logic signed [ADC_W-1:0]  sample;
  logic                     sample_valid, ovr, miss;
  logic signed [CORR_W-1:0] corr;
  logic                     corr_valid;
  logic                     trig_level, trig_rise;
  logic                     index_level, index_rise;
  flux_rec_t                rec, head;
  logic                     rec_valid, integ_started;
  logic                     fifo_empty, fifo_full, fifo_ovf, flux_pop;
  logic [FCW-1:0]           fifo_count;
  logic [9:0]               fifo_count_sat;
  logic [CAL_W-1:0]         dac_short;
  logic signed [ADC_W-1:0]  resid;
  logic                     ovr_sticky;

  local_io #(.DEBOUNCE(DEBOUNCE), .STRETCH(STRETCH)) u_local_io (
    .clk, .por_n, .on_sw, .btn_reset_n,
    .ovr_evt (ovr), .err_lvl (status.err),
    .rst_n_out (rst_n), .led_ovr, .led_err
  );

  bus_regs u_regs (
    .clk, .rst_n,
    .bus_addr, .bus_wr, .bus_wdata, .bus_rd, .bus_rdata, .bus_rvalid,
    .cmd_valid, .cmd,
    .range_req, .cfg_ok, .sample_div, .n_points, .gain, .use_index, .cal_period,
    .status, .pga_settling, .full_scale_mv (fs_mv),
    .ovr_evt (ovr), .ovr_sticky,
    .dac_short, .dac_coil (dac_code), .pot_code, .resid,
    .flux_head (head), .flux_empty (fifo_empty), .flux_count (fifo_count_sat),
    .flux_pop,
    .sample_evt (sample_valid), .adc_irq, .fpga_irq, .prio0_irq
  );

  fdi_ctrl #(.BOOT_TIMEOUT(BOOT_TIMEOUT)) u_ctrl (
    .clk, .rst_n, .cmd_valid, .cmd, .dev_ready, .dsp_err, .cal_period,
    .cfg_ok, .cfg_err, .cfg_busy (pga_settling),
    .cal_done, .cal_err,
    .meas_done, .meas_err (fifo_ovf),
    .state (inst_state), .status,
    .cfg_apply, .cal_start, .meas_start, .meas_arm
  );

  pga_ctrl #(.SETTLE(PGA_SETTLE)) u_pga (
    .clk, .rst_n, .apply (cfg_apply), .range_req,
    .pga_gain, .vref_sel, .fs_mv, .settling (pga_settling), .cfg_ok, .cfg_err
  );

  adc_if u_adc (
    .clk, .rst_n,
    .en (cal_busy || meas_arm), .sample_div,
    .adc_cnvst, .adc_busy, .adc_data,
    .sample, .sample_valid, .ovr, .miss
  );

  self_cal #(.SETTLE(CAL_SETTLE)) u_cal (
    .clk, .rst_n, .start (cal_start),
    .sample, .sample_valid,
    .in_sel, .dac_code, .pot_code, .dac_short, .resid,
    .busy (cal_busy), .done (cal_done), .err (cal_err), .err_step (cal_err_step)
  );

  err_corr u_corr (
    .clk, .rst_n,
    .x (sample), .x_valid (sample_valid),
    .offset (resid), .gain,
    .y (corr), .y_valid (corr_valid)
  );

  trig_detect #(.FILT(TRIG_FILT)) u_trig (
    .clk, .rst_n, .trig_in, .level (trig_level), .rise (trig_rise)
  );

  trig_detect #(.FILT(TRIG_FILT)) u_index (
    .clk, .rst_n, .trig_in (index_in), .level (index_level), .rise (index_rise)
  );

  flux_integrator u_integ (
    .clk, .rst_n,
    .arm (meas_arm), .n_rec (n_points), .use_index, .index (index_rise),
    .sample (corr), .sample_valid (corr_valid),
    .trig (trig_rise),
    .rec, .rec_valid, .started (integ_started), .done (meas_done)
  );

  flux_fifo #(.W(REC_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clr (meas_start),
    .wr_en (rec_valid), .wr_data (rec),
    .rd_en (flux_pop), .rd_data (head),
    .empty (fifo_empty), .full (fifo_full), .count (fifo_count),
    .overflow (fifo_ovf)
  );

  assign fifo_count_sat = (fifo_count > FCW'(1023)) ? 10'd1023 : 10'(fifo_count);

endmodule
