// tb_pga_ctrl: self-checking test of the PGA range control.
//
// Applies every valid range index in random order and some invalid ones.
// Checks the full-scale value of each of the ten ranges (0.1 V to 100 V),
// that gain pins and reference selection follow the index, that `settling`
// lasts exactly SETTLE clocks after a change and not at all when the range
// stays the same, and that an invalid index is refused with `cfg_err` and
// changes nothing.
module tb_pga_ctrl;
  localparam int SETTLE = 12;
  logic clk = 0, rst_n = 0, apply = 0;
  logic [3:0] range_req, pga_gain, vref_sel;
  logic [16:0] fs_mv;
  logic settling, cfg_ok, cfg_err;
  int checks = 0, failures = 0;

  pga_ctrl #(.SETTLE(SETTLE)) dut (.*);

  always #5 clk = ~clk;

  int fs_table[10] = '{100, 250, 500, 1000, 2500, 5000, 10000, 25000, 50000, 100000};

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_apply(input logic [3:0] r, output int settle_clks, output bit ok, output bit er);
    @(negedge clk) range_req = r; apply = 1;
    @(negedge clk) apply = 0;
    ok = cfg_ok; er = cfg_err;
    settle_clks = 0;
    while (settling) begin
      @(negedge clk);
      settle_clks++;
    end
  endtask

  initial begin
    int sc, cur;
    bit ok, er;
    range_req = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (!settling);
    cur = 6;
    for (int i = 0; i < 40; i++) begin
      int r;
      r = (i < 10) ? i : int'($urandom_range(0, 14));
      do_apply(4'(r), sc, ok, er);
      if (r < 10) begin
        chk(ok && !er, $sformatf("range %0d accepted", r));
        chk(sc == ((r != cur) ? SETTLE : 0), $sformatf("range %0d settling %0d", r, sc));
        cur = r;
      end else begin
        chk(!ok && er, $sformatf("range %0d refused", r));
        chk(sc == 0, "no settling on refusal");
      end
      chk(int'(pga_gain) == cur && int'(vref_sel) == cur, "gain and reference follow range");
      chk(int'(fs_mv) == fs_table[cur], $sformatf("full scale %0d for range %0d", fs_mv, cur));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
