// fdi_pkg: types and constants shared by the fast digital integrator FPGA.
//
// The integrator digitises the voltage of a rotating-coil transducer with an
// 18-bit ADC, integrates the samples between encoder triggers and delivers
// one flux increment per trigger.  This package holds the widths the blocks
// agree on, the instrument states of the firmware state machine, the user
// command codes, the analog input selection used by the self-calibration and
// the record written for each flux increment.
//
// The ADC width (18 bit), the calibration word width (16 bit) and the list of
// states follow the instrument description; the command and state encodings,
// the accumulator and counter widths and the record layout are this design's
// own choices.
package fdi_pkg;

  localparam int unsigned ADC_W  = 18;  // ADC resolution
  localparam int unsigned CAL_W  = 16;  // offset DAC / gain potentiometer word
  localparam int unsigned CORR_W = ADC_W + 2;  // corrected sample width
  localparam int unsigned ACC_W  = 48;  // flux accumulator width
  localparam int unsigned CNT_W  = 24;  // samples per flux increment
  localparam int unsigned BUS_W  = 32;  // local bus data width
  localparam int unsigned N_RANGES = 10; // full-scale ranges of the input

  // Instrument states.  The value is what the instrument_status register shows.
  typedef enum logic [2:0] {
    ST_BOOTSTRAP = 3'd0,
    ST_READY     = 3'd1,
    ST_CONFIG    = 3'd2,  // configuration / send_receive_cmds
    ST_SELF_CAL  = 3'd3,
    ST_MEASURE   = 3'd4,
    ST_RECOVERY  = 3'd5
  } state_e;

  // User commands, written to the command register.
  typedef enum logic [2:0] {
    CMD_NONE     = 3'd0,
    CMD_CONFIG   = 3'd1,  // apply the pending configuration
    CMD_SELF_CAL = 3'd2,
    CMD_MEASURE  = 3'd3,
    CMD_READY    = 3'd4,  // force READY out of RECOVERY
    CMD_RESET    = 3'd5,  // user reset: RECOVERY -> BOOTSTRAP
    CMD_STOP     = 3'd6   // end a running measurement
  } cmd_e;

  // Analog input selection in front of the PGA.
  typedef enum logic [1:0] {
    IN_COIL  = 2'd0,
    IN_SHORT = 2'd1,
    IN_VREF  = 2'd2
  } in_sel_e;

  // Error sources reported in the status register (one-hot bits).
  localparam int unsigned ERR_BOOT = 0;  // devices not ready in time
  localparam int unsigned ERR_CFG  = 1;  // invalid configuration
  localparam int unsigned ERR_CAL  = 2;  // calibration target unreachable
  localparam int unsigned ERR_MEAS = 3;  // flux data lost

  typedef struct packed {
    logic               err;        // an error occurred, state is RECOVERY
    logic [2:0]         err_state;  // state in which the error occurred
    logic [3:0]         err_src;    // ERR_* bits
    logic [7:0]         dsp_err;    // error code reported by the processor
    logic [2:0]         state;      // last state entered (not RECOVERY)
  } status_t;

  // One flux increment: sum of corrected samples between two triggers and
  // the number of samples summed (the interval in sampling periods).
  typedef struct packed {
    logic                     ovf;    // sample counter saturated
    logic signed [ACC_W-1:0]  flux;
    logic        [CNT_W-1:0]  nsamp;
  } flux_rec_t;

  localparam int unsigned REC_W = $bits(flux_rec_t);

endpackage
