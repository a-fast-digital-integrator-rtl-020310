// tb_bus_regs: self-checking test of the local-bus registers.
//
// Checks the reset values, write/read-back of the pending configuration
// registers, that the active configuration (MODE included) changes only on
// `cfg_ok` while CAL_PERIOD acts at once, the
// command strobe, the status word layout, the sticky over-range flag and its
// clear, the calibration and flux read-back, the pop on reading FLUX_N
// (also back to back), the one-clock read latency and the three interrupts
// with their enables.
module tb_bus_regs;
  import fdi_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] bus_addr = 0;
  logic bus_wr = 0, bus_rd = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic bus_rvalid, cmd_valid;
  cmd_e cmd;
  logic [3:0] range_req;
  logic cfg_ok = 0;
  logic [15:0] sample_div, gain;
  logic [CNT_W-1:0] n_points;
  logic use_index;
  logic [31:0] cal_period;
  status_t status;
  logic pga_settling = 0;
  logic [16:0] full_scale_mv = 17'd25000;
  logic ovr_evt = 0, ovr_sticky;
  logic [15:0] dac_short = 16'h1234, dac_coil = 16'h5678, pot_code = 16'h9ABC;
  logic signed [17:0] resid = -18'sd5;
  flux_rec_t flux_head;
  logic flux_empty = 0;
  logic [9:0] flux_count = 10'd3;
  logic flux_pop, sample_evt = 0, adc_irq, fpga_irq, prio0_irq;
  int checks = 0, failures = 0;
  int n_pop = 0;

  bus_regs dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (flux_pop) n_pop++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk) bus_addr = a; bus_wdata = d; bus_wr = 1;
    @(negedge clk) bus_wr = 0;
  endtask

  task automatic rd(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk) bus_addr = a; bus_rd = 1;
    @(negedge clk) bus_rd = 0;
    chk(bus_rvalid, "read data valid one clock later");
    d = bus_rdata;
  endtask

  initial begin
    logic [31:0] d;
    status = '0;
    flux_head = '{ovf: 1'b1, flux: 48'hABCD_1234_5678, nsamp: 24'd40};
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(sample_div == 25 && n_points == 512 && gain == 16'h8000 && range_req == 6, "reset values");
    rd(4'h3, d); chk(d == 25, "SAMPLE_DIV reset");
    wr(4'h3, 32'd40); wr(4'h4, 32'd1000); wr(4'h5, 32'h7F00); wr(4'h2, 32'd3);
    wr(4'hE, 32'd1); wr(4'hF, 32'd123456);
    chk(cal_period == 123456 && !use_index, "CAL_PERIOD immediate, MODE pending");
    rd(4'hF, d); chk(d == 123456, "CAL_PERIOD readback");
    rd(4'hE, d); chk(d == 1, "MODE readback");
    rd(4'h3, d); chk(d == 40, "SAMPLE_DIV readback");
    rd(4'h4, d); chk(d == 1000, "N_POINTS readback");
    rd(4'h5, d); chk(d == 32'h7F00, "GAIN readback");
    chk(range_req == 3, "range request");
    chk(sample_div == 25 && n_points == 512 && gain == 16'h8000, "active config unchanged before cfg_ok");
    @(negedge clk) cfg_ok = 1;
    @(negedge clk) cfg_ok = 0;
    chk(sample_div == 40 && n_points == 1000 && gain == 16'h7F00 && use_index, "active config after cfg_ok");
    // command
    @(negedge clk) bus_addr = 4'h0; bus_wdata = 32'd3; bus_wr = 1;
    @(negedge clk) bus_wr = 0;
    chk(cmd_valid && cmd == CMD_MEASURE, "command strobe");
    @(negedge clk) chk(!cmd_valid, "command strobe one clock");
    // status
    status.state = 3'd4; status.dsp_err = 8'h77; status.err = 1'b1;
    pga_settling = 1;
    pulse_ovr();
    rd(4'h1, d);
    chk(d[18:0] == 19'(status) && d[19] && !d[20] && d[21] && d[31:22] == 10'd3, "status word");
    wr(4'h1, 32'h0008_0000);
    rd(4'h1, d); chk(!d[19], "over-range flag cleared");
    // calibration results
    rd(4'h6, d); chk(d == 32'h1234_5678, "CAL_DAC");
    rd(4'h7, d); chk(d == 32'h9ABC, "CAL_POT");
    rd(4'h8, d); chk(d == 32'hFFFF_FFFB, "RESID sign-extended");
    rd(4'hC, d); chk(d == 25000, "FULL_SCALE");
    // flux
    rd(4'h9, d); chk(d == 32'h1234_5678, "FLUX_LO");
    rd(4'hA, d); chk(d == 32'h8000_ABCD, "FLUX_HI");
    chk(n_pop == 0, "no pop before FLUX_N");
    rd(4'hB, d); chk(d == 40 && n_pop == 1, "FLUX_N and pop");
    @(negedge clk) bus_addr = 4'hB; bus_rd = 1;
    @(negedge clk);
    @(negedge clk) bus_rd = 0;
    chk(n_pop == 3, "back-to-back pops");
    flux_empty = 1;
    rd(4'hB, d); chk(n_pop == 3, "no pop when empty");
    // interrupts
    wr(4'hD, 32'h7);
    flux_empty = 0;
    @(negedge clk) sample_evt = 1;
    @(negedge clk) sample_evt = 0;
    chk(adc_irq && fpga_irq && prio0_irq, "interrupts enabled");
    wr(4'hD, 32'h0);
    @(negedge clk) sample_evt = 1;
    @(negedge clk) sample_evt = 0;
    chk(!adc_irq && !fpga_irq && !prio0_irq, "interrupts masked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_ovr();
    @(negedge clk) ovr_evt = 1;
    @(negedge clk) ovr_evt = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
