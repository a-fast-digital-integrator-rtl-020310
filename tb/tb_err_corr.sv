// tb_err_corr: self-checking test of the offset and gain correction.
//
// Drives random samples, offsets and gain coefficients (plus the extreme
// codes) and compares each output, one clock after its input, with
// floor((x - offset) * gain / 2**15) computed in 64-bit integer arithmetic.
module tb_err_corr;
  logic clk = 0, rst_n = 0;
  logic signed [17:0] x, offset;
  logic x_valid;
  logic [15:0] gain;
  logic signed [19:0] y;
  logic y_valid;
  int checks = 0, failures = 0;

  err_corr dut (.*);

  always #5 clk = ~clk;

  function automatic longint floor_div(input longint a, input longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && (a < 0)) q = q - 1;
    return q;
  endfunction

  initial begin
    longint exp_y;
    x = 0; offset = 0; gain = 16'h8000; x_valid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      x       = 18'($urandom);
      offset  = 18'(int'($urandom_range(0, 4000)) - 2000);
      gain    = 16'($urandom);
      if (i < 4) begin
        x      = (i % 2 == 0) ? 18'h1FFFF : 18'h20000;
        offset = (i % 2 == 0) ? -18'sd131072 : 18'sd131071;
        gain   = 16'hFFFF;
      end
      x_valid = 1;
      exp_y = floor_div((longint'(x) - longint'(offset)) * longint'(gain), 32768);
      @(negedge clk);
      x_valid = 0;
      checks++;
      if (!y_valid || longint'(y) != exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL: x=%0d off=%0d g=%0d y=%0d exp=%0d", x, offset, gain, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
