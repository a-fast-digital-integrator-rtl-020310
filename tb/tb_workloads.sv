// tb_workloads: the described operating points run through the full design.
//
// The design runs at its default parameters, with the behavioural analog
// chain fe_model.  The host reads every flux increment over the local bus
// while the measurement runs.  Three operating points are run:
//   A. Reference test: 6.469 rad/s, 512 points per turn, 0.1859 V peak coil
//      signal on the 0.25 V range, 625 kS/s (sample_div 32).  One full turn,
//      512 increments of about 1186 samples.
//   B. New-generation coil: 10 turns/s, 20 kHz trigger rate, 800 kS/s.
//      One full turn, 2000 increments of 40 samples.  The buffer holds only
//      512, so the host must keep up.
//   C. Shortest integration time: one trigger per 1.25 us sample,
//      4000 increments of exactly one sample.
// The expected increment is built from the ADC words seen on the pins,
// grouped by the trigger edges seen on the pins.  A sample that lands within
// a few clocks of an edge may fall on either side, so each increment must
// match within one full-scale sample, and its count within one.  Each phase
// must end in READY with no buffer overflow, and the sum of all increments
// must equal the sum of all samples between the first and the last edge.
module tb_workloads;
  import fdi_pkg::*;

  logic clk = 0, por_n = 0, on_sw = 1, btn_reset_n = 1;
  logic adc_cnvst, adc_busy;
  logic [17:0] adc_data;
  in_sel_e in_sel;
  logic [15:0] dac_code, pot_code;
  logic [3:0] pga_gain, vref_sel;
  logic index_in = 0;
  logic trig_in = 0, dev_ready = 1;
  logic [7:0] dsp_err = 8'h00;
  logic [3:0] bus_addr = 0;
  logic bus_wr = 0, bus_rd = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic bus_rvalid, adc_irq, fpga_irq, prio0_irq, led_ovr, led_err;
  state_e inst_state;
  real coil = 0.0, vref = 120000.0;
  int checks = 0, failures = 0;

  fdi_top dut (.*);

  fe_model #(.OFFSET_ERR(0.0), .DAC_LSB(0.0), .GAIN_MIN(1.0), .GAIN_MAX(1.0), .CONV_CLKS(10)) u_fe (
    .clk, .in_sel (2'(in_sel)), .dac_code, .pot_code, .coil, .vref,
    .cnvst (adc_cnvst), .busy (adc_busy), .data (adc_data)
  );

  always #25 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s (state %s)", what, inst_state.name());
    end
  endtask

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
    @(negedge clk);
  endtask
  task automatic wait_state(input state_e s, input int max_clk, input string what);
    int n = 0;
    while (inst_state != s && n < max_clk) begin @(negedge clk); n++; end
    chk(inst_state == s, what);
  endtask

  // ------------------------------------------------------------- stimulus
  longint t_clk = 0;
  real trig_period = 1000.0, turn_clks = 1.0e6, amp = 0.0;
  bit running = 0;
  real next_edge = 0.0;
  longint edges[$];
  always @(posedge clk) begin
    t_clk <= t_clk + 1;
    if (running) begin
      coil <= amp * $sin(2.0 * 3.14159265358979 * real'(t_clk) / turn_clks);
      if (real'(t_clk) >= next_edge) begin
        trig_in <= 1'b1;
        edges.push_back(t_clk);
        next_edge = next_edge + trig_period;
      end else if (real'(t_clk) >= next_edge - trig_period / 2.0) begin
        trig_in <= 1'b0;
      end
    end else begin
      trig_in <= 1'b0;
    end
  end

  // ADC words and their times, as seen on the pins
  longint w_t[$];
  int     w_v[$];
  always @(posedge clk) if (running && $fell(adc_busy)) begin
    w_t.push_back(t_clk);
    w_v.push_back(int'(signed'(adc_data)));
  end

  // samples between edge e0 and edge e1, shifted by the path latency
  localparam int LAT = 3;
  function automatic longint take_interval(input longint e0, input longint e1, output int n);
    longint s = 0;
    n = 0;
    while (w_t.size() > 0 && w_t[0] <= e1 + LAT) begin
      if (w_t[0] > e0 + LAT) begin
        s += longint'(w_v[0]);
        n++;
      end
      void'(w_t.pop_front());
      void'(w_v.pop_front());
    end
    return s;
  endfunction

  task automatic run_point(input string name, input int range_idx, input int div, input int npts,
                           input real period, input real turn, input real a);
    logic [31:0] d, lo, hi, nn;
    int k, nexp, nmin, nmax;
    longint fgot, fexp, sum_got, sum_exp;
    wr(4'h2, 32'(range_idx)); wr(4'h3, 32'(div)); wr(4'h4, 32'(npts)); wr(4'h5, 32'h8000);
    command(CMD_CONFIG);
    wait_state(ST_READY, 5000, {name, ": configured"});
    edges.delete(); w_t.delete(); w_v.delete();
    trig_period = period; turn_clks = turn; amp = a;
    next_edge = real'(t_clk) + 200.0;
    command(CMD_MEASURE);
    running = 1;
    k = 0; sum_got = 0; sum_exp = 0;
    nmin = 1 << 30; nmax = 0;
    while (k < npts && (inst_state == ST_MEASURE || inst_state == ST_READY)) begin
      rd(4'h1, d);
      if (!d[20]) begin
        rd(4'h9, lo); rd(4'hA, hi); rd(4'hB, nn);
        fgot = longint'({hi[15:0], lo});
        fgot = (fgot << 16) >>> 16;
        wait (edges.size() > k + 1 && w_t.size() > 0 && w_t[$] > edges[k + 1] + LAT);
        fexp = take_interval(edges[k], edges[k + 1], nexp);
        chk((fgot - fexp <= 131072) && (fexp - fgot <= 131072) && (int'(nn) - nexp <= 1) && (nexp - int'(nn) <= 1),
            $sformatf("%s increment %0d: %0d/%0d expected about %0d/%0d", name, k, fgot, nn, fexp, nexp));
        sum_got += fgot;
        sum_exp += fexp;
        if (int'(nn) < nmin) nmin = int'(nn);
        if (int'(nn) > nmax) nmax = int'(nn);
        k++;
      end
    end
    running = 0;
    wait_state(ST_READY, 100, {name, ": measurement ended in READY"});
    rd(4'h1, d);
    chk(!d[18], {name, ": no error"});
    chk(k == npts, $sformatf("%s: %0d of %0d increments read", name, k, npts));
    chk(sum_got - sum_exp <= 131072 && sum_exp - sum_got <= 131072, $sformatf("%s: total %0d vs %0d", name, sum_got, sum_exp));
    $display("%s: %0d increments, %0d..%0d samples each, total flux sum %0d", name, k, nmin, nmax, sum_got);
  endtask

  initial begin
    real p;
    repeat (5) @(negedge clk);
    por_n = 1;
    wait_state(ST_READY, 100, "booted");
    // A: 6.469 rad/s, 512 points per turn, 625 kS/s, 0.1859 V of 0.25 V
    p = 2.0 * 3.14159265358979 / 6.469 / 512.0 * 20.0e6;
    run_point("reference test", 1, 32, 512, p, p * 512.0, 0.1859 / 0.25 * 131071.0);
    // B: 10 turns/s, 20 kHz triggers, 800 kS/s
    run_point("20 kHz trigger", 6, 25, 2000, 1000.0, 2.0e6, 100000.0);
    // C: one trigger per 1.25 us sample
    run_point("1.25 us integration", 6, 25, 4000, 25.0, 1.0e5, 100000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (25_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
