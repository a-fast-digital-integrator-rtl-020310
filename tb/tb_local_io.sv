// tb_local_io: self-checking test of the front-panel reset and indicators.
//
// Uses short debounce (8) and stretch (30) lengths.  Checks that the board
// reset follows the power-on reset with a two-clock synchronous release,
// that a bouncing button press shorter than the debounce time does nothing
// while a held press resets the board, that the ON switch holds the reset,
// and that the over-range and error indicators stay lit for the stretch
// time after a one-clock event.
module tb_local_io;
  localparam int DEBOUNCE = 8, STRETCH = 30;
  logic clk = 0, por_n = 0, on_sw = 1, btn_reset_n = 1, ovr_evt = 0, err_lvl = 0;
  logic rst_n_out, led_ovr, led_err;
  int checks = 0, failures = 0;

  local_io #(.DEBOUNCE(DEBOUNCE), .STRETCH(STRETCH)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int n;
    repeat (3) @(negedge clk);
    chk(!rst_n_out, "reset during power-on reset");
    por_n = 1;
    @(negedge clk); chk(!rst_n_out, "reset held one clock");
    @(negedge clk); chk(rst_n_out, "reset released after two clocks");
    // bouncing press shorter than the debounce time
    repeat (3) begin
      @(negedge clk) btn_reset_n = 0;
      repeat (3) @(negedge clk);
      btn_reset_n = 1;
      @(negedge clk);
    end
    repeat (DEBOUNCE + 4) begin @(negedge clk); chk(rst_n_out, "bounce ignored"); end
    // held press
    btn_reset_n = 0;
    n = 0;
    while (rst_n_out && n < 50) begin @(negedge clk); n++; end
    chk(!rst_n_out && n >= DEBOUNCE && n <= DEBOUNCE + 4, $sformatf("held press resets after %0d", n));
    btn_reset_n = 1;
    n = 0;
    while (!rst_n_out && n < 50) begin @(negedge clk); n++; end
    chk(rst_n_out && n >= DEBOUNCE, "release after debounce");
    // ON switch
    @(negedge clk) on_sw = 0;
    #1 chk(!rst_n_out, "ON off asserts reset at once");
    @(negedge clk) on_sw = 1;
    repeat (2) @(negedge clk);
    chk(rst_n_out, "ON on releases reset");
    // indicators
    @(negedge clk) ovr_evt = 1;
    @(negedge clk) ovr_evt = 0;
    n = 0;
    while (led_ovr && n < 100) begin @(negedge clk); n++; end
    chk(n == STRETCH, $sformatf("over-range lit %0d clocks", n));
    @(negedge clk) err_lvl = 1;
    repeat (5) @(negedge clk);
    chk(led_err, "error lit");
    err_lvl = 0;
    n = 0;
    while (led_err && n < 100) begin @(negedge clk); n++; end
    chk(n == STRETCH, $sformatf("error lit %0d clocks after flag", n));
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
