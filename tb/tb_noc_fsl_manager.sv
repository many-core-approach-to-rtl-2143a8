// tb_noc_fsl_manager -- checks one router input: the header is consumed and
// not forwarded, the destination field becomes the request mask (unicast,
// multicast, broadcast) held for the whole packet, each payload word is
// forwarded in order exactly once and only while every requested output
// answers, words are popped from the input link after forwarding, empty
// packets pass, and an idle packet costs three cycles per word.
module tb_noc_fsl_manager;
  import dct_noc_pkg::*;
  logic clk = 0, rst = 1;
  logic s_read, s_exists = 0, m_write;
  word_t s_data = '0, m_data;
  logic [NPORTS-1:0] request, reply;
  int checks = 0, failures = 0;
  word_t in_q[$];
  word_t exp_q[$];
  logic [NPORTS-1:0] mask_q[$];
  bit stall_replies = 1;
  int writes = 0, stalls = 0, cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  noc_fsl_manager dut (.*);

  always #5 clk = ~clk;

  always @(negedge clk) begin
    s_exists = (in_q.size() != 0);
    s_data   = s_exists ? in_q[0] : '0;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Replies: each requested output answers at random (or always)
  always @(negedge clk) begin
    for (int o = 0; o < NPORTS; o++)
      reply[o] = request[o] & (stall_replies ? ($urandom_range(2) != 0) : 1'b1);
  end

  always @(posedge clk) if (!rst) begin
    if (m_write) begin
      writes++;
      checks++;
      if (exp_q.size() == 0 || m_data != exp_q[0] || reply != request) begin
        failures++; $display("FAIL forwarded word %h", m_data);
      end else void'(exp_q.pop_front());
      checks++;
      if (mask_q.size() == 0 || request != mask_q[0]) begin
        failures++; $display("FAIL request mask %b", request);
      end else void'(mask_q.pop_front());
    end else if (request != '0 && reply != request) stalls++;
    if (s_read) begin
      void'(in_q.pop_front());
    end
  end

  task automatic send(int size, logic [NPORTS-1:0] mask);
    in_q.push_back(make_header(16'(size), mask));
    for (int i = 0; i < size; i++) begin
      word_t w;
      w = $urandom;
      in_q.push_back(w);
      exp_q.push_back(w);
      mask_q.push_back(mask);
    end
  endtask

  initial begin
    reply = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    send(3, 4'b0010);
    send(0, 4'b0100);
    send(5, 4'b1110);
    send(4, 4'b1111);
    for (int i = 0; i < 60; i++) send($urandom_range(0, 6), NPORTS'($urandom_range(1, 15)));
    wait (in_q.size() == 0);
    repeat (10) @(negedge clk);
    check(exp_q.size() == 0, "all payload forwarded");
    check(stalls > 0, "permission stalls happened");
    // timing on an always-answering network: 3 cycles per payload word
    stall_replies = 0;
    begin
      int t0, t1;
      @(negedge clk);
      send(10, 4'b0001);
      t0 = cyc;
      wait (in_q.size() == 0);
      t1 = cyc;
      check(t1 - t0 == 3 * 10 + 2, $sformatf("packet of 10 words took %0d cycles", t1 - t0));
    end
    repeat (5) @(negedge clk);
    check(request == '0, "request released after the packet");
    $display("writes=%0d stalls=%0d", writes, stalls);
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
