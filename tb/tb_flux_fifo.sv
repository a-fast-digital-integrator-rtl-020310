// tb_flux_fifo: self-checking test of the flux increment buffer.
//
// Random writes and reads on a small buffer (DEPTH 8) are compared with a
// queue model: head word, empty, full, fill level, the dropped write and the
// sticky overflow flag on a write into a full buffer, and the clear input.
module tb_flux_fifo;
  localparam int W = 20, DEPTH = 8;
  logic clk = 0, rst_n = 0, clr = 0, wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data, rd_data;
  logic empty, full, overflow;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;

  flux_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  logic [W-1:0] q[$];
  bit m_ovf = 0;
  int n_ovf_events = 0;

  task automatic compare();
    checks++;
    if (empty != (q.size() == 0) || full != (q.size() == DEPTH) || int'(count) != q.size()
        || (q.size() > 0 && rd_data != q[0]) || overflow != m_ovf) begin
      failures++;
      if (failures < 10) $display("FAIL: size %0d count %0d empty %0d full %0d ovf %0d/%0d",
                                  q.size(), count, empty, full, overflow, m_ovf);
    end
  endtask

  initial begin
    wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      compare();
      // phases: fill-heavy, drain-heavy, balanced
      wr_en   = ($urandom_range(0, 99) < ((i / 500) % 2 == 0 ? 70 : 30));
      rd_en   = ($urandom_range(0, 99) < ((i / 500) % 2 == 0 ? 30 : 70));
      clr     = (i % 1000 == 999);
      wr_data = W'($urandom);
      @(posedge clk);
      if (clr) begin
        q.delete(); m_ovf = 0;
      end else begin
        bit was_full, was_empty;
        was_full = (q.size() == DEPTH);
        was_empty = (q.size() == 0);
        if (rd_en && !was_empty) void'(q.pop_front());
        if (wr_en && !was_full) q.push_back(wr_data);
        if (wr_en && was_full) begin m_ovf = 1; n_ovf_events++; end
      end
    end
    checks++;
    if (n_ovf_events == 0) begin failures++; $display("FAIL: overflow never exercised"); end
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
