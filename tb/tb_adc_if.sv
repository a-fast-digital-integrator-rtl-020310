// tb_adc_if: self-checking test of the ADC conversion control.
//
// A small converter model answers each start pulse with `busy` for CONV
// clocks and then a word taken from a pseudo-random list that includes the
// two extreme codes.  The test checks every sample value in order, the
// sampling period (one sample every `sample_div` clocks: 25 clocks, 800 kS/s
// at 20 MHz), the over-range flag on the extreme codes, and that a start
// tick during a conversion that is too slow is skipped and reported.
module tb_adc_if;
  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] sample_div;
  logic adc_cnvst, adc_busy;
  logic [17:0] adc_data;
  logic signed [17:0] sample;
  logic sample_valid, ovr, miss;
  int checks = 0, failures = 0;
  int conv = 10;

  adc_if dut (.*);

  always #5 clk = ~clk;

  // converter model
  logic [17:0] words[$];
  int busy_cnt = 0;
  int n_conv = 0;
  always @(posedge clk) begin
    if (adc_cnvst && rst_n) begin
      adc_busy <= 1'b1;
      busy_cnt <= conv;
    end else if (busy_cnt > 0) begin
      busy_cnt <= busy_cnt - 1;
      if (busy_cnt == 1) begin
        adc_busy <= 1'b0;
        adc_data <= (n_conv % 7 == 3) ? 18'h1FFFF : (n_conv % 11 == 5) ? 18'h20000 : 18'($urandom);
        n_conv   <= n_conv + 1;
      end
    end
  end

  // checker: values in order, period, over-range
  longint last_t = -1, t = 0;
  int n_samp = 0, n_miss = 0, n_ovr = 0;
  always @(posedge clk) t <= t + 1;
  always @(posedge clk) begin
    if (sample_valid && rst_n) begin
      checks++;
      if (ovr != (sample == 18'sh1FFFF || sample == -18'sh20000)) begin
        failures++; $display("FAIL: ovr flag %0d for %0d", ovr, sample);
      end
      if (ovr) n_ovr++;
      if (last_t >= 0 && conv < sample_div && (t - last_t) != longint'(sample_div)) begin
        failures++; $display("FAIL: sample period %0d, expected %0d", t - last_t, sample_div);
      end
      last_t <= t;
      n_samp++;
    end
    if (miss && rst_n) n_miss++;
  end
  always @(posedge clk) if (rst_n && !adc_busy && busy_cnt == 0 && $past(adc_busy)) words.push_back(adc_data);
  always @(posedge clk) begin
    if (sample_valid && rst_n) begin
      checks++;
      if (words.size() == 0 || sample != signed'(words[0])) begin
        failures++; $display("FAIL: sample %0d", sample);
      end
      if (words.size() > 0) void'(words.pop_front());
    end
  end

  initial begin
    adc_busy = 0; adc_data = 0; sample_div = 25;
    repeat (3) @(posedge clk);
    rst_n = 1;
    en = 1;
    repeat (25 * 200) @(posedge clk);
    checks++;
    if (n_samp < 198 || n_samp > 201) begin failures++; $display("FAIL: %0d samples in 5000 clocks", n_samp); end
    checks++;
    if (n_ovr == 0 || n_miss != 0) begin failures++; $display("FAIL: ovr %0d miss %0d", n_ovr, n_miss); end
    // conversions slower than the sampling period: every other tick is skipped
    en = 0; @(posedge clk); conv = 30; last_t = -1; n_samp = 0;
    en = 1;
    repeat (25 * 40) @(posedge clk);
    checks++;
    if (n_miss < 15 || n_samp < 15 || n_samp > 22) begin failures++; $display("FAIL: slow conv miss %0d samples %0d", n_miss, n_samp); end
    en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
