// fdi_ctrl: instrument state machine and instrument_status register.
//
// States and transitions:
//   BOOTSTRAP  after reset; goes to READY once the devices report ready
//              (`dev_ready`), or to RECOVERY if they do not within
//              BOOT_TIMEOUT clocks.
//   READY      waits for a user command.  Self-calibration goes to SELF_CAL,
//              measurement to MEASURE, every other command to CONFIG.
//   CONFIG     executes the other commands.  A configuration command pulses
//              `cfg_apply` and waits for the result (`cfg_ok`/`cfg_err`) and
//              then for `cfg_busy` to fall; other commands do nothing here.
//   SELF_CAL   pulses `cal_start` and waits for `cal_done` or `cal_err`.
//              Besides the user command, a periodic self-calibration enters
//              it from READY once `cal_period` clocks (0 = never) have passed
//              since the last calibration; if the period ends during another
//              state, the calibration follows as soon as READY is reached.
//   MEASURE    pulses `meas_start`, holds `meas_arm` and waits for
//              `meas_done`, a stop command or `meas_err`.
//   RECOVERY   entered on any error.  A user reset command goes back to
//              BOOTSTRAP, a user ready command forces READY.
// Every state returns to READY when its work ends without error.
//
// The status register keeps the last state entered; it is not updated on
// entry to RECOVERY, so it still names the state in which the error
// occurred.  On an error it also records that state, the error source and
// the error code reported by the processor (`dsp_err`), and sets `err`,
// which is cleared when RECOVERY is left.  All outputs are registered except
// `state`, which is the state register itself; a command is acted on in the
// clock after `cmd_valid`.
//
// The states, the transitions, the status-register rule and a periodic
// self-calibration follow the instrument description; the encodings, the
// boot time-out, the command handshake and the calibration timer (counted
// in clocks, running in every state) are this design's choices.
module fdi_ctrl
  import fdi_pkg::*;
#(
  parameter int unsigned BOOT_TIMEOUT = 1_000_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cmd_valid,
  input  cmd_e       cmd,
  input  logic       dev_ready,
  input  logic [7:0] dsp_err,
  input  logic [31:0] cal_period,  // clocks between automatic calibrations
  input  logic       cfg_ok,
  input  logic       cfg_err,
  input  logic       cfg_busy,
  input  logic       cal_done,
  input  logic       cal_err,
  input  logic       meas_done,
  input  logic       meas_err,
  output state_e     state,
  output status_t    status,
  output logic       cfg_apply,
  output logic       cal_start,
  output logic       meas_start,
  output logic       meas_arm
);

  localparam int unsigned TW = $clog2(BOOT_TIMEOUT + 1);

  state_e        nxt;
  logic [3:0]    err_src;
  logic [TW-1:0] boot_cnt;
  logic          cfg_wait;    // waiting for cfg_ok / cfg_err
  logic          cfg_pending; // CONFIG entered with a configuration command
  logic          cfg_applied; // configuration accepted, waiting to settle
  logic [31:0]   cal_timer;   // clocks since the last calibration
  logic          cal_due;     // periodic calibration pending

  always_comb begin
    nxt     = state;
    err_src = '0;
    unique case (state)
      ST_BOOTSTRAP: begin
        if (dev_ready) nxt = ST_READY;
        else if (boot_cnt == TW'(BOOT_TIMEOUT)) begin
          nxt = ST_RECOVERY;
          err_src[ERR_BOOT] = 1'b1;
        end
      end
      ST_READY: begin
        if (cmd_valid) begin
          unique case (cmd)
            CMD_SELF_CAL: nxt = ST_SELF_CAL;
            CMD_MEASURE:  nxt = ST_MEASURE;
            default:      nxt = ST_CONFIG;
          endcase
        end else if (cal_due) begin
          nxt = ST_SELF_CAL;
        end
      end
      ST_CONFIG: begin
        if (cfg_err) begin
          nxt = ST_RECOVERY;
          err_src[ERR_CFG] = 1'b1;
        end else if (!cfg_pending && !cfg_wait && !cfg_applied) begin
          nxt = ST_READY;
        end else if (cfg_applied && !cfg_busy) begin
          nxt = ST_READY;
        end
      end
      ST_SELF_CAL: begin
        if (cal_err) begin
          nxt = ST_RECOVERY;
          err_src[ERR_CAL] = 1'b1;
        end else if (cal_done) begin
          nxt = ST_READY;
        end
      end
      ST_MEASURE: begin
        if (meas_err) begin
          nxt = ST_RECOVERY;
          err_src[ERR_MEAS] = 1'b1;
        end else if (meas_done || (cmd_valid && cmd == CMD_STOP)) begin
          nxt = ST_READY;
        end
      end
      ST_RECOVERY: begin
        if (cmd_valid && cmd == CMD_RESET)      nxt = ST_BOOTSTRAP;
        else if (cmd_valid && cmd == CMD_READY) nxt = ST_READY;
      end
      default: nxt = ST_RECOVERY;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_BOOTSTRAP;
      status      <= '0;
      boot_cnt    <= '0;
      cfg_wait    <= 1'b0;
      cfg_pending <= 1'b0;
      cfg_applied <= 1'b0;
      cal_timer   <= '0;
      cal_due     <= 1'b0;
      cfg_apply   <= 1'b0;
      cal_start   <= 1'b0;
      meas_start  <= 1'b0;
      meas_arm    <= 1'b0;
    end else begin
      cfg_apply  <= 1'b0;
      cal_start  <= 1'b0;
      meas_start <= 1'b0;
      state      <= nxt;

      // boot time-out counter runs only in BOOTSTRAP
      if (state == ST_BOOTSTRAP && boot_cnt != TW'(BOOT_TIMEOUT)) boot_cnt <= boot_cnt + 1'b1;
      if (state != ST_BOOTSTRAP) boot_cnt <= '0;

      // configuration handshake
      if (state == ST_READY && nxt == ST_CONFIG) cfg_pending <= (cmd == CMD_CONFIG);
      if (state == ST_CONFIG && cfg_pending) begin
        cfg_apply   <= 1'b1;
        cfg_pending <= 1'b0;
        cfg_wait    <= 1'b1;
      end
      if (cfg_wait && (cfg_ok || cfg_err)) begin
        cfg_wait    <= 1'b0;
        cfg_applied <= cfg_ok;
      end
      if (nxt != ST_CONFIG) begin
        cfg_wait    <= 1'b0;
        cfg_pending <= 1'b0;
        cfg_applied <= 1'b0;
      end

      // periodic calibration timer, restarted by every calibration
      if (nxt == ST_SELF_CAL && state != ST_SELF_CAL) begin
        cal_start <= 1'b1;
        cal_timer <= '0;
        cal_due   <= 1'b0;
      end else if (cal_period == '0) begin
        cal_timer <= '0;
        cal_due   <= 1'b0;
      end else if (cal_timer >= cal_period - 1) begin
        cal_due   <= 1'b1;
      end else begin
        cal_timer <= cal_timer + 1'b1;
      end
      if (nxt == ST_MEASURE && state != ST_MEASURE)  meas_start <= 1'b1;
      meas_arm <= (nxt == ST_MEASURE);

      // instrument_status register
      if (nxt != state) begin
        if (nxt == ST_RECOVERY) begin
          status.err       <= 1'b1;
          status.err_state <= state;
          status.err_src   <= err_src;
          status.dsp_err   <= dsp_err;
        end else begin
          status.state <= nxt;
          if (state == ST_RECOVERY) status.err <= 1'b0;
        end
      end
    end
  end

endmodule
