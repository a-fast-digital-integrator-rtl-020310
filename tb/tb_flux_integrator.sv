// tb_flux_integrator: self-checking test of the trigger-to-trigger integrator.
//
// Random signed samples arrive every 1 to 4 clocks and triggers at random
// intervals, sometimes in the same clock as a sample.  A reference model in
// the testbench sums the samples between triggers; every record must match
// it in sum and sample count and arrive one clock after its trigger.  The
// first trigger after arming must give no record, a disarmed integrator must
// give none, and `done` must rise after exactly `n_rec` records.  A fourth
// run waits for the zero pulse: triggers before it must give nothing.
module tb_flux_integrator;
  import fdi_pkg::*;
  logic clk = 0, rst_n = 0, arm = 0;
  logic [CNT_W-1:0] n_rec;
  logic signed [CORR_W-1:0] sample;
  logic sample_valid, trig;
  logic use_index = 0, index = 0;
  flux_rec_t rec;
  logic rec_valid, started, done;
  int checks = 0, failures = 0;

  flux_integrator dut (.*);

  always #5 clk = ~clk;

  // reference model
  longint m_acc = 0;
  int m_cnt = 0;
  bit m_started = 0;
  bit m_index = 0;
  int m_nrec = 0;
  longint exp_flux[$];
  int exp_cnt[$];
  bit expect_rec = 0;

  always @(posedge clk) begin
    if (rec_valid && rst_n) begin
      checks++;
      if (!expect_rec || exp_flux.size() == 0 || rec.flux != exp_flux[0] || rec.nsamp != CNT_W'(exp_cnt[0]) || rec.ovf) begin
        failures++;
        $display("FAIL: record %0d/%0d", rec.flux, rec.nsamp);
      end
      if (exp_flux.size() > 0) begin void'(exp_flux.pop_front()); void'(exp_cnt.pop_front()); end
    end else if (expect_rec) begin
      checks++; failures++;
      $display("FAIL: record missing");
    end
    expect_rec = 0;
    if (arm && !(n_rec != 0 && m_nrec == int'(n_rec))) begin
      if (index) m_index = 1;
      if (trig && (!use_index || m_index)) begin
        if (m_started) begin
          exp_flux.push_back(m_acc); exp_cnt.push_back(m_cnt);
          expect_rec = 1;
          m_nrec++;
        end
        m_started = 1;
        m_acc = sample_valid ? longint'(sample) : 0;
        m_cnt = sample_valid ? 1 : 0;
      end else if (m_started && sample_valid) begin
        m_acc += longint'(sample);
        m_cnt++;
      end
    end
    if (!arm) begin m_index = 0; m_started = 0; m_nrec = 0; m_acc = 0; m_cnt = 0; end
  end

  int n_before_index = 0;
  always @(posedge clk) if (rst_n && use_index && rec_valid && !m_index) n_before_index++;
  initial begin
    int n_valid;
    sample = 0; sample_valid = 0; trig = 0; n_rec = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      n_rec = (run == 1) ? 7 : 0;
      use_index = (run == 3);
      @(negedge clk) arm = 1;
      n_valid = 0;
      for (int i = 0; i < 3000; i++) begin
        @(negedge clk);
        sample_valid = ($urandom_range(0, 3) == 0);
        sample = CORR_W'(int'($urandom_range(0, 1 << 20)) - (1 << 19));
        trig = ($urandom_range(0, 60) == 0);
        index = (i == 1500) || (i == 2500);
        if (i == 1500) trig = 1;
        if (trig) n_valid++;
      end
      @(negedge clk) trig = 0; sample_valid = 0; index = 0;
      @(negedge clk);
      checks++;
      if (run == 3 && (n_before_index != 0 || !started)) begin
        failures++; $display("FAIL: %0d records before the zero pulse", n_before_index);
      end
      checks++;
      if (run == 1 && !done) begin failures++; $display("FAIL: done not set after n_rec records"); end
      if (run != 1 && done)  begin failures++; $display("FAIL: done set without limit"); end
      arm = 0;
      // disarmed: triggers and samples must give nothing
      repeat (20) begin
        @(negedge clk) trig = 1; sample_valid = 1;
      end
      @(negedge clk) trig = 0; sample_valid = 0;
      repeat (3) @(negedge clk);
    end
    checks++;
    if (exp_flux.size() != 0) begin failures++; $display("FAIL: %0d records missing", exp_flux.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
