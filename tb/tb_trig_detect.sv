// tb_trig_detect: self-checking test of the trigger input conditioning.
//
// Sends clean encoder pulses of random length and spacing, each followed by
// glitches shorter than the filter, and checks that every clean rising edge
// gives exactly one `rise` pulse, FILT+2 clocks after the edge, and that no
// glitch gives one.
module tb_trig_detect;
  localparam int FILT = 4;
  logic clk = 0, rst_n = 0, trig_in = 0;
  logic level, rise;
  int checks = 0, failures = 0;

  trig_detect #(.FILT(FILT)) dut (.*);

  always #5 clk = ~clk;

  longint t = 0, edge_t = -1;
  int n_rise = 0;
  always @(posedge clk) begin
    t <= t + 1;
    if (rise && rst_n) begin
      n_rise++;
      checks++;
      if (edge_t < 0 || t - edge_t != FILT + 2) begin
        failures++;
        $display("FAIL: rise %0d clocks after edge", t - edge_t);
      end
      edge_t = -1;
    end
  end

  initial begin
    int n_edges = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    for (int i = 0; i < 50; i++) begin
      @(negedge clk) trig_in = 1; edge_t = t;
      n_edges++;
      repeat ($urandom_range(FILT + 1, 40)) @(negedge clk);
      trig_in = 0;
      repeat ($urandom_range(FILT + 2, 40)) @(negedge clk);
      // glitch
      trig_in = 1;
      repeat ($urandom_range(1, FILT - 1)) @(negedge clk);
      trig_in = 0;
      repeat (FILT + 4) @(negedge clk);
    end
    repeat (20) @(posedge clk);
    checks++;
    if (n_rise != n_edges) begin
      failures++;
      $display("FAIL: %0d rises for %0d edges", n_rise, n_edges);
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
