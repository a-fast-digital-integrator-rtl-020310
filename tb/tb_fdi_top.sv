// tb_fdi_top: end-to-end test of the integrator FPGA at its default sizes.
//
// The analog chain and ADC are the behavioural fe_model; the coil voltage is
// a sine of one period per turn whose peaks exceed the ADC range, and the
// encoder gives one trigger every 40 samples (1000 clocks: 20 kHz at 20 MHz).
// Each trigger edge is placed 20 clocks after a conversion start, so the
// testbench knows which conversions belong to which interval: it records the
// ADC words on the converter pins, applies the correction with the
// calibration values read back over the bus, and sums them per interval to
// get the expected flux increments.
//
// Sequence: boot time-out and recovery, user reset, a refused configuration,
// user ready, a valid configuration (with PGA settling), a calibration that
// fails (reference too small), a good calibration checked against an
// exhaustive search on the model, a measurement of 64 increments ended by
// the point count with every increment checked, a measurement ended by a
// stop command that also waits for the zero pulse of the encoder before
// integrating, a measurement whose buffer overflows because the host does
// not read, and a periodic self-calibration started by the timer.  Each of these mechanisms, the over-range indication and
// the three interrupts is counted and must have happened.
module tb_fdi_top;
  import fdi_pkg::*;

  localparam int DIV = 25;
  localparam int TRIG_SAMPLES = 40;
  localparam int N_MEAS = 64;

  logic clk = 0, por_n = 0, on_sw = 1, btn_reset_n = 1;
  logic adc_cnvst, adc_busy;
  logic [17:0] adc_data;
  in_sel_e in_sel;
  logic [15:0] dac_code, pot_code;
  logic [3:0] pga_gain, vref_sel;
  logic index_in = 0;
  logic trig_in = 0, dev_ready = 0;
  logic [7:0] dsp_err = 8'h21;
  logic [3:0] bus_addr = 0;
  logic bus_wr = 0, bus_rd = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic bus_rvalid, adc_irq, fpga_irq, prio0_irq, led_ovr, led_err;
  state_e inst_state;
  real coil = 0.0, vref = 120000.0;
  int checks = 0, failures = 0;

  fdi_top dut (.*);

  fe_model #(.OFFSET_ERR(1234.0), .DAC_LSB(3.0), .GAIN_MIN(0.9), .GAIN_MAX(1.2), .CONV_CLKS(10)) u_fe (
    .clk, .in_sel (2'(in_sel)), .dac_code, .pot_code, .coil, .vref,
    .cnvst (adc_cnvst), .busy (adc_busy), .data (adc_data)
  );

  always #25 clk = ~clk;  // 20 MHz

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (state %s)", what, inst_state.name()); end
  endtask

  // ---------------------------------------------------------------- bus
  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk) bus_addr = a; bus_wdata = d; bus_wr = 1;
    @(negedge clk) bus_wr = 0;
  endtask
  task automatic rd(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk) bus_addr = a; bus_rd = 1;
    @(negedge clk) bus_rd = 0;
    d = bus_rdata;
  endtask
  task automatic command(input cmd_e c);
    wr(4'h0, 32'(c));
    @(negedge clk);  // the state changes in the clock after the command strobe
  endtask
  task automatic wait_state(input state_e s, input int max_clk, input string what);
    int n = 0;
    while (inst_state != s && n < max_clk) begin @(negedge clk); n++; end
    chk(inst_state == s, what);
  endtask

  // ---------------------------------------------------------------- events
  int n_boot_to = 0, n_cfg_err = 0, n_cal_err = 0, n_cal_ok = 0, n_meas_done = 0, n_stop = 0;
  int n_fifo_ovf = 0, n_user_reset = 0, n_user_ready = 0, n_settle = 0;
  int n_index = 0, n_periodic = 0;
  int n_ovr = 0, n_adc_irq = 0, n_fpga_irq = 0, n_prio0_irq = 0, n_records = 0;
  always @(posedge clk) begin
    if (led_ovr) n_ovr++;
    if (adc_irq) n_adc_irq++;
    if (fpga_irq) n_fpga_irq++;
    if (prio0_irq) n_prio0_irq++;
    if (inst_state == ST_CONFIG) n_settle++;
  end

  // ---------------------------------------------------------------- stimulus
  // Coil: sine of one period per turn of N_MEAS triggers, amplitude above
  // the ADC full scale so that the peaks clip.
  bit rotating = 0;
  longint t_clk = 0;
  always @(posedge clk) begin
    t_clk <= t_clk + 1;
    if (rotating) coil <= 140000.0 * $sin(2.0 * 3.14159265358979 * real'(t_clk) / real'(N_MEAS * TRIG_SAMPLES * DIV));
  end

  // Encoder: a rising edge 20 clocks after every TRIG_SAMPLES-th conversion
  // start, high for 400 clocks.  Conversions are numbered from the first
  // start of a measurement; `edge_conv` lists the last conversion before
  // each edge.
  bit encoder_on = 0;
  int conv_idx = -1;
  int edge_conv[$];
  longint rise_at = -1, fall_at = -1;
  always @(posedge clk) begin
    if (adc_cnvst && encoder_on) begin
      conv_idx = conv_idx + 1;
      if (conv_idx % TRIG_SAMPLES == 0) begin
        edge_conv.push_back(conv_idx);
        rise_at = t_clk + 20;
        fall_at = t_clk + 420;
      end
    end
    if (t_clk == rise_at) trig_in <= 1'b1;
    if (t_clk == fall_at) trig_in <= 1'b0;
  end

  // ADC words seen on the pins, in conversion order
  logic [17:0] words[$];
  always @(posedge clk) if (encoder_on && $fell(adc_busy)) words.push_back(adc_data);

  // expected increment k: conversions edge_conv[k]+1 .. edge_conv[k+1]
  function automatic longint expected_flux(input int k, input int rs, input int g, output int n);
    longint s = 0;
    n = 0;
    for (int c = edge_conv[k] + 1; c <= edge_conv[k + 1]; c++) begin
      longint d;
      d = (longint'(signed'(words[c])) - longint'(rs)) * longint'(g);
      d = (d < 0 && (d % 32768) != 0) ? d / 32768 - 1 : d / 32768;
      s += d;
      n++;
    end
    return s;
  endfunction

  task automatic start_measurement();
    conv_idx = -1;
    edge_conv.delete();
    words.delete();
    encoder_on = 1;
    command(CMD_MEASURE);
  endtask

  function automatic int smallest(input int which, input logic [15:0] dac_fix, input logic [15:0] pot_fix, input real c);
    for (int k = 0; k < 65536; k++) begin
      if (which == 1 && signed'(u_fe.convert(2'd1, 16'(k), pot_fix, c)) >= 0) return k;
      if (which == 2 && signed'(u_fe.convert(2'd2, dac_fix, 16'(k), c)) >= 131071) return k;
      if (which == 3 && signed'(u_fe.convert(2'd0, 16'(k), pot_fix, c)) >= 0) return k;
    end
    return -1;
  endfunction

  initial begin
    logic [31:0] d, lo, hi, nn;
    int e1, e2, e3, rs, g, nexp, k;
    longint fexp, fgot;
    repeat (5) @(negedge clk);
    por_n = 1;
    repeat (5) @(negedge clk);
    wr(4'hD, 32'h7);  // all interrupts on

    // 1. devices never ready: boot time-out
    wait_state(ST_RECOVERY, 1_100_000, "boot time-out");
    rd(4'h1, d);
    chk(d[18] && d[14:11] == 4'b0001 && d[17:15] == 3'(ST_BOOTSTRAP) && d[10:3] == 8'h21, "boot error in status");
    chk(led_err, "error indicator");
    if (inst_state == ST_RECOVERY) n_boot_to++;
    // 2. user reset, devices ready
    dev_ready = 1;
    command(CMD_RESET);
    wait_state(ST_READY, 10, "ready after user reset");
    n_user_reset++;
    // 3. refused configuration
    wr(4'h2, 32'd12);
    command(CMD_CONFIG);
    wait_state(ST_RECOVERY, 20, "invalid range refused");
    rd(4'h1, d);
    if (d[12]) n_cfg_err++;
    command(CMD_READY);
    wait_state(ST_READY, 5, "user ready");
    n_user_ready++;
    // 4. valid configuration: 2.5 V range, 800 kS/s, 64 points, gain 0.9922
    wr(4'h2, 32'd4); wr(4'h3, 32'(DIV)); wr(4'h4, 32'(N_MEAS)); wr(4'h5, 32'h7F00);
    command(CMD_CONFIG);
    @(negedge clk);
    chk(inst_state == ST_CONFIG, "configuring");
    wait_state(ST_READY, 2000, "configuration done");
    chk(pga_gain == 4 && vref_sel == 4, "PGA range applied");
    rd(4'hC, d); chk(d == 2500, "full scale 2.5 V");
    // 5. calibration with a reference too small for full scale
    vref = 100000.0;
    command(CMD_SELF_CAL);
    wait_state(ST_RECOVERY, 20000, "calibration error");
    rd(4'h1, d);
    if (d[13] && d[17:15] == 3'(ST_SELF_CAL)) n_cal_err++;
    command(CMD_READY);
    wait_state(ST_READY, 5, "ready again");
    // 6. good calibration, coil at rest with a small offset
    vref = 120000.0;
    coil = 37.0;
    e1 = smallest(1, 0, pot_code, coil);
    command(CMD_SELF_CAL);
    wait_state(ST_READY, 20000, "calibration done");
    n_cal_ok++;
    e2 = smallest(2, 16'(e1), 0, coil);
    e3 = smallest(3, 0, 16'(e2), coil);
    rd(4'h6, d); chk(d[31:16] == 16'(e1) && d[15:0] == 16'(e3), $sformatf("offset DAC codes %h, expected %h/%h", d, e1, e3));
    rd(4'h7, d); chk(d[15:0] == 16'(e2), $sformatf("gain code %0d expected %0d", d[15:0], e2));
    rd(4'h8, d); rs = int'(signed'(d));
    chk(rs == int'(signed'(u_fe.convert(2'd0, 16'(e3), 16'(e2), coil))), "residual offset");
    g = 32'h7F00;
    // 7. measurement of N_MEAS increments, read while it runs
    rotating = 1;
    start_measurement();
    k = 0;
    while (k < N_MEAS) begin
      rd(4'h1, d);
      if (!d[20]) begin
        rd(4'h9, lo); rd(4'hA, hi); rd(4'hB, nn);
        fgot = longint'({hi[15:0], lo});
        fgot = (fgot << 16) >>> 16;
        if (edge_conv.size() > k + 1 && words.size() > edge_conv[k + 1]) begin
          fexp = expected_flux(k, rs, g, nexp);
          chk(fgot == fexp && int'(nn) == nexp && !hi[31],
              $sformatf("increment %0d: %0d/%0d expected %0d/%0d", k, fgot, nn, fexp, nexp));
        end else begin
          chk(0, "increment before its trigger");
        end
        n_records++;
        k++;
      end
      if (t_clk > 4_000_000) break;
    end
    wait_state(ST_READY, 2000, "measurement ended by point count");
    if (inst_state == ST_READY) n_meas_done++;
    encoder_on = 0;
    // 8. endless measurement from the zero pulse, ended by a stop command
    wr(4'h4, 32'd0); wr(4'hE, 32'd1);
    command(CMD_CONFIG);
    wait_state(ST_READY, 2000, "endless configured");
    start_measurement();
    repeat (5 * TRIG_SAMPLES * DIV) @(negedge clk);
    rd(4'h1, d);
    chk(d[31:22] == 0, "nothing integrated before the zero pulse");
    index_in = 1;
    repeat (300) @(negedge clk);
    index_in = 0;
    repeat (10 * TRIG_SAMPLES * DIV) @(negedge clk);
    rd(4'h1, d);
    chk(d[31:22] >= 8 && d[31:22] <= 10, $sformatf("%0d increments buffered", d[31:22]));
    if (d[31:22] >= 8) n_index++;
    command(CMD_STOP);
    wait_state(ST_READY, 5, "stopped");
    if (inst_state == ST_READY) n_stop++;
    encoder_on = 0;
    wr(4'hE, 32'd0);
    command(CMD_CONFIG);
    wait_state(ST_READY, 2000, "free start configured");
    // 9. nobody reads: the buffer overflows
    start_measurement();
    wait_state(ST_RECOVERY, 600 * TRIG_SAMPLES * DIV, "buffer overflow");
    rd(4'h1, d);
    if (d[14] && d[17:15] == 3'(ST_MEASURE)) n_fifo_ovf++;
    chk(d[31:22] == 10'd512, "buffer full");
    encoder_on = 0;
    command(CMD_READY);
    wait_state(ST_READY, 5, "ready after overflow");
    // 10. periodic self-calibration every 50000 clocks
    rotating = 0;
    coil = 37.0;
    wr(4'hF, 32'd50000);
    repeat (40000) @(negedge clk);
    chk(inst_state == ST_READY, "no calibration before the period");
    wait_state(ST_SELF_CAL, 20000, "periodic calibration started");
    wait_state(ST_READY, 20000, "periodic calibration done");
    if (inst_state == ST_READY) n_periodic++;
    wr(4'hF, 32'd0);

    chk(n_boot_to > 0, "boot time-out happened");
    chk(n_user_reset > 0 && n_user_ready > 0, "user reset and ready happened");
    chk(n_cfg_err > 0, "configuration error happened");
    chk(n_settle > 500, "PGA settling happened");
    chk(n_cal_err > 0 && n_cal_ok > 0, "calibration error and success happened");
    chk(n_meas_done > 0 && n_stop > 0, "measurement done and stop happened");
    chk(n_fifo_ovf > 0, "buffer overflow happened");
    chk(n_index > 0, "start on the zero pulse happened");
    chk(n_periodic > 0, "periodic calibration happened");
    chk(n_ovr > 0, "over-range happened");
    chk(n_adc_irq > 0 && n_fpga_irq > 0 && n_prio0_irq > 0, "all interrupts happened");
    chk(n_records == N_MEAS, "all increments read");
    $display("events: boot_to=%0d cfg_err=%0d cal_err=%0d cal_ok=%0d done=%0d stop=%0d ovf=%0d ovr=%0d records=%0d index=%0d periodic=%0d",
             n_boot_to, n_cfg_err, n_cal_err, n_cal_ok, n_meas_done, n_stop, n_fifo_ovf, n_ovr, n_records, n_index, n_periodic);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
