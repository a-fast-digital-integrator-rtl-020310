// tb_self_cal: self-checking test of the dichotomic self-calibration.
//
// The testbench plays the analog chain: every PERIOD clocks it presents one
// ADC sample computed from the input selection and the DAC / potentiometer
// codes the block drives, using a linear model with a random offset error,
// reference level and coil offset.  The expected results are found by an
// exhaustive scan of all 65536 codes for the smallest code reaching each
// target.  It checks the three codes, the residual offset, the run time
// (17 trials per step plus one residual sample), and the two error cases
// (offset out of reach in step 1, reference too small in step 2).
module tb_self_cal;
  import fdi_pkg::*;

  localparam int SETTLE = 8;
  localparam int PERIOD = 5;

  logic clk = 0, rst_n = 0, start = 0;
  logic signed [17:0] sample;
  logic sample_valid;
  in_sel_e in_sel;
  logic [15:0] dac_code, pot_code, dac_short;
  logic signed [17:0] resid;
  logic busy, done, err;
  logic [1:0] err_step;
  int checks = 0, failures = 0;

  int off_err, vref, coil_off;

  self_cal #(.SETTLE(SETTLE)) dut (.*);

  always #5 clk = ~clk;

  function automatic int model(input logic [1:0] sel, input logic [15:0] dac, input logic [15:0] pot);
    longint vin, v;
    case (sel)
      2'd1: vin = 0;
      2'd2: vin = vref;
      default: vin = coil_off;
    endcase
    // gain = (0.75 + pot/131072), in 1/131072 steps
    v = (vin * (98304 + longint'(pot))) / 131072 + off_err + (longint'(dac) - 32768) / 2;
    if (v > 131071) v = 131071;
    if (v < -131072) v = -131072;
    return int'(v);
  endfunction

  int pcnt = 0;
  always @(posedge clk) begin
    sample_valid <= 1'b0;
    pcnt <= (pcnt == PERIOD - 1) ? 0 : pcnt + 1;
    if (pcnt == 0) begin
      sample       <= 18'(model(in_sel, dac_code, pot_code));
      sample_valid <= 1'b1;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int smallest(input int which, input logic [15:0] dac_fix, input logic [15:0] pot_fix);
    for (int c = 0; c < 65536; c++) begin
      if (which == 1 && model(2'd1, 16'(c), pot_fix) >= 0) return c;
      if (which == 2 && model(2'd2, dac_fix, 16'(c)) >= 131071) return c;
      if (which == 3 && model(2'd0, 16'(c), pot_fix) >= 0) return c;
    end
    return -1;
  endfunction

  task automatic run_cal(output int cycles, output bit got_err);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 1;
    got_err = 0;
    while (!done && !err) begin
      @(posedge clk);
      cycles++;
      #1;
    end
    got_err = err;
  endtask

  initial begin
    int cyc, e1, e2, e3, pot_before;
    bit gerr;
    sample = '0;
    sample_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      off_err  = int'($urandom_range(0, 8000)) - 4000;
      vref     = 110000 + int'($urandom_range(0, 40000));
      coil_off = int'($urandom_range(0, 600)) - 300;
      pot_before = pot_code;
      run_cal(cyc, gerr);
      e1 = smallest(1, 0, 16'(pot_before));
      e2 = smallest(2, 16'(e1), 0);
      e3 = smallest(3, 0, 16'(e2));
      chk(!gerr, "calibration reported an error");
      chk(dac_short == 16'(e1), $sformatf("step1 dac %0d expected %0d", dac_short, e1));
      chk(pot_code == 16'(e2), $sformatf("step2 pot %0d expected %0d", pot_code, e2));
      chk(dac_code == 16'(e3), $sformatf("step3 dac %0d expected %0d", dac_code, e3));
      chk(int'(resid) == model(2'd0, 16'(e3), 16'(e2)), "residual offset");
      chk(int'(resid) >= 0 && (e3 == 0 || model(2'd0, 16'(e3 - 1), 16'(e2)) < 0), "residual is first code at/above zero");
      chk(in_sel == IN_COIL, "coil selected after calibration");
      // 52 samples, each preceded by SETTLE clocks and at most PERIOD clocks of waiting
      chk(cyc >= 52 * SETTLE && cyc <= 52 * (SETTLE + PERIOD + 2),
          $sformatf("calibration took %0d clocks", cyc));
    end
    // step 1 unreachable: offset far below the DAC range
    off_err = -40000; vref = 120000; coil_off = 0;
    run_cal(cyc, gerr);
    chk(gerr && err_step == 2'd1, "offset out of reach reported in step 1");
    chk(!busy, "idle after error");
    // step 2 unreachable: reference too small for full scale
    off_err = 0; vref = 60000;
    run_cal(cyc, gerr);
    chk(gerr && err_step == 2'd2, "reference too small reported in step 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
