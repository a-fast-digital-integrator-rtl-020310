// tb_fdi_ctrl: self-checking test of the instrument state machine.
//
// Walks through every transition of the state machine: boot time-out to
// RECOVERY, user reset back to BOOTSTRAP, boot to READY, configuration with
// and without error, a command that only passes through CONFIG,
// self-calibration with and without error, measurement ended by `meas_done`,
// by a stop command and by an error, and user ready out of RECOVERY.  Checks
// the state, the start pulses, the measurement arm, and the
// instrument_status register (last state kept across RECOVERY, error state,
// source and processor code).  Last, the periodic self-calibration: entered
// from READY when the period ends, deferred while a measurement runs.
module tb_fdi_ctrl;
  import fdi_pkg::*;
  localparam int BOOT_TIMEOUT = 50;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0;
  cmd_e cmd = CMD_NONE;
  logic dev_ready = 0;
  logic [7:0] dsp_err = 8'h5A;
  logic [31:0] cal_period = 0;
  logic cfg_ok = 0, cfg_err = 0, cfg_busy = 0, cal_done = 0, cal_err = 0, meas_done = 0, meas_err = 0;
  state_e state;
  status_t status;
  logic cfg_apply, cal_start, meas_start, meas_arm;
  int checks = 0, failures = 0;
  int n_apply = 0, n_cal = 0, n_meas = 0;
  bit cfg_fail = 0;

  fdi_ctrl #(.BOOT_TIMEOUT(BOOT_TIMEOUT)) dut (.*);

  always #5 clk = ~clk;

  // configuration responder: result one clock after apply, then 5 busy clocks
  always @(posedge clk) begin
    cfg_ok  <= cfg_apply && !cfg_fail;
    cfg_err <= cfg_apply && cfg_fail;
    if (cfg_apply && rst_n) n_apply++;
    if (cal_start && rst_n) n_cal++;
    if (meas_start && rst_n) n_meas++;
  end
  initial begin
    forever begin
      @(posedge clk);
      if (cfg_ok) begin
        cfg_busy <= 1;
        repeat (5) @(posedge clk);
        cfg_busy <= 0;
      end
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (state %s)", what, state.name()); end
  endtask

  task automatic send(input cmd_e c);
    @(negedge clk) cmd = c; cmd_valid = 1;
    @(negedge clk) cmd_valid = 0;
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1;
    @(negedge clk) s = 0;
  endtask

  task automatic wait_state(input state_e s, input int max_clk);
    int n = 0;
    while (state != s && n < max_clk) begin @(negedge clk); n++; end
    chk(state == s, $sformatf("reached %s", s.name()));
  endtask

  initial begin
    int t0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(state == ST_BOOTSTRAP, "bootstrap after reset");
    // boot time-out
    t0 = 0;
    while (state == ST_BOOTSTRAP && t0 < 200) begin @(negedge clk); t0++; end
    chk(state == ST_RECOVERY && t0 >= BOOT_TIMEOUT && t0 <= BOOT_TIMEOUT + 2, $sformatf("boot time-out after %0d", t0));
    chk(status.err && status.err_src[ERR_BOOT] && status.err_state == 3'(ST_BOOTSTRAP) && status.dsp_err == 8'h5A,
        "boot error recorded");
    chk(status.state == 3'(ST_BOOTSTRAP), "status keeps state before recovery");
    send(CMD_SELF_CAL);
    chk(state == ST_RECOVERY, "recovery ignores other commands");
    send(CMD_RESET);
    chk(state == ST_BOOTSTRAP && !status.err, "user reset to bootstrap");
    dev_ready = 1;
    wait_state(ST_READY, 5);
    chk(status.state == 3'(ST_READY), "status ready");
    // configuration OK
    send(CMD_CONFIG);
    chk(state == ST_CONFIG, "config entered");
    wait_state(ST_READY, 20);
    chk(n_apply == 1, "one apply");
    // other command passes through CONFIG without apply
    send(CMD_STOP);
    chk(state == ST_CONFIG, "other command in CONFIG");
    wait_state(ST_READY, 5);
    chk(n_apply == 1, "no apply for other command");
    // configuration error
    cfg_fail = 1;
    send(CMD_CONFIG);
    wait_state(ST_RECOVERY, 10);
    chk(status.err_src[ERR_CFG] && status.err_state == 3'(ST_CONFIG) && status.state == 3'(ST_CONFIG), "config error recorded");
    cfg_fail = 0;
    send(CMD_READY);
    chk(state == ST_READY && !status.err, "user ready");
    // self calibration
    send(CMD_SELF_CAL);
    chk(state == ST_SELF_CAL && cal_start, "self cal started");
    repeat (5) @(negedge clk);
    pulse(cal_done);
    chk(state == ST_READY, "self cal done");
    send(CMD_SELF_CAL);
    pulse(cal_err);
    chk(state == ST_RECOVERY && status.err_src[ERR_CAL] && status.err_state == 3'(ST_SELF_CAL), "cal error");
    send(CMD_READY);
    // measurement, ended by done
    send(CMD_MEASURE);
    chk(state == ST_MEASURE && meas_start, "measure started");
    @(negedge clk);
    chk(meas_arm, "armed");
    pulse(meas_done);
    chk(state == ST_READY, "measure done");
    @(negedge clk);
    chk(!meas_arm, "disarmed");
    // measurement, ended by stop
    send(CMD_MEASURE);
    repeat (3) @(negedge clk);
    send(CMD_STOP);
    chk(state == ST_READY, "measure stopped");
    // measurement error
    send(CMD_MEASURE);
    pulse(meas_err);
    chk(state == ST_RECOVERY && status.err_src[ERR_MEAS] && status.err_state == 3'(ST_MEASURE)
        && status.state == 3'(ST_MEASURE), "measure error");
    @(negedge clk);
    chk(!meas_arm, "disarmed in recovery");
    send(CMD_RESET);
    wait_state(ST_READY, 5);
    // periodic calibration every 40 clocks
    repeat (100) @(negedge clk);
    chk(state == ST_READY, "no calibration while period is 0");
    cal_period = 40;
    t0 = 0;
    while (state == ST_READY && t0 < 100) begin @(negedge clk); t0++; end
    chk(state == ST_SELF_CAL && t0 >= 39 && t0 <= 42, $sformatf("periodic calibration after %0d clocks", t0));
    pulse(cal_done);
    chk(state == ST_READY, "periodic calibration done");
    send(CMD_MEASURE);
    repeat (60) @(negedge clk);
    chk(state == ST_MEASURE, "measurement not interrupted");
    send(CMD_STOP);
    chk(state == ST_READY, "stop returns to ready");
    @(negedge clk);
    chk(state == ST_SELF_CAL, "deferred calibration follows the measurement");
    cal_period = 0;
    pulse(cal_done);
    repeat (60) @(negedge clk);
    chk(state == ST_READY, "periodic calibration off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
