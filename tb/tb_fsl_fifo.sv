// tb_fsl_fifo -- checks the FSL FIFO against a queue model under random
// reads and writes: order, exists, full at DEPTH entries, simultaneous
// read/write, and that writes are only issued while not full.
module tb_fsl_fifo;
  import dct_noc_pkg::*;
  localparam int D = 4;
  logic clk = 0, rst = 1, m_write = 0, s_read = 0;
  word_t m_data = '0, s_data;
  logic m_full, s_exists;
  int checks = 0, failures = 0, full_seen = 0;
  word_t q[$];

  fsl_fifo #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(s_exists == (q.size() != 0), "exists");
      check(m_full == (q.size() == D), $sformatf("full (size %0d)", q.size()));
      if (q.size() != 0) check(s_data == q[0], "head data");
      if (m_full) full_seen++;
      // bias towards filling in the first half, draining in the second
      m_write = !m_full && ($urandom_range(99) < (i < 1500 ? 70 : 30));
      s_read  = s_exists && ($urandom_range(99) < (i < 1500 ? 30 : 70));
      m_data  = $urandom;
      @(posedge clk);
      if (s_read) void'(q.pop_front());
      if (m_write) q.push_back(m_data);
    end
    check(full_seen > 0, "FIFO reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
