// tb_noc_router -- checks the four-port router with all inputs loaded at
// once: every payload word reaches every output named in its header, in
// order, exactly once; packets do not interleave on an output; headers are
// not forwarded; a full output link is never written; multicast (from
// port 0) reaches all its outputs; contention and back-pressure both occur.
// Payload words carry {source, packet number, word number} so the checker
// knows where each one came from. Also measures the idle-router latency:
// the first payload word is written in the cycle after the third clock
// edge that follows the header's arrival.
module tb_noc_router;
  import dct_noc_pkg::*;
  logic clk = 0, rst = 1;
  logic [NPORTS-1:0] s_read, m_write, m_full;
  logic [NPORTS-1:0] s_exists = '0;
  word_t [NPORTS-1:0] s_data = '0, m_data;
  int checks = 0, failures = 0, cyc = 0;
  word_t in_q [NPORTS][$];
  word_t exp_q [NPORTS][NPORTS][$];     // [output][source]
  int cur_src [NPORTS];                 // source of the packet in flight on an output
  int left [NPORTS];                    // words left of that packet
  int pkt_len [NPORTS][int];            // [source][packet id] -> size
  int full_stalls = 0, multicasts = 0, contention = 0, delivered = 0;
  bit random_full = 1;

  noc_router dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    for (int p = 0; p < NPORTS; p++) begin
      s_exists[p] = (in_q[p].size() != 0);
      s_data[p]   = s_exists[p] ? in_q[p][0] : '0;
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(int src, int id, int size, logic [NPORTS-1:0] mask);
    in_q[src].push_back(make_header(16'(size), mask));
    pkt_len[src][id] = size;
    if ($countones(mask) > 1 && size > 0) multicasts++;
    for (int i = 0; i < size; i++) begin
      word_t w;
      w = {4'(src), 12'(id), 16'(i)};
      in_q[src].push_back(w);
      for (int o = 0; o < NPORTS; o++) if (mask[o]) exp_q[o][src].push_back(w);
    end
  endtask

  always @(negedge clk) m_full = random_full ? NPORTS'($urandom_range(15) & $urandom_range(15)) : '0;

  always @(posedge clk) if (!rst) begin
    int busy_inputs;
    busy_inputs = 0;
    for (int p = 0; p < NPORTS; p++) if (dut.req[p] != '0) busy_inputs++;
    if (busy_inputs > 1) contention++;
    for (int o = 0; o < NPORTS; o++) begin
      if (m_full[o] && dut.mod_req[o] != '0) full_stalls++;
      if (m_write[o]) begin
        int src, id, idx;
        src = int'(m_data[o][31:28]); id = int'(m_data[o][27:16]); idx = int'(m_data[o][15:0]);
        delivered++;
        checks++;
        if (m_full[o]) begin failures++; $display("FAIL write to full output %0d", o); end
        checks++;
        if (src >= NPORTS || exp_q[o][src].size() == 0 || exp_q[o][src][0] != m_data[o]) begin
          failures++; $display("FAIL out %0d unexpected word %h", o, m_data[o]);
        end else void'(exp_q[o][src].pop_front());
        // contiguity
        checks++;
        if (left[o] == 0) begin
          cur_src[o] = src;
          left[o] = pkt_len[src][id];
          if (idx != 0) begin failures++; $display("FAIL out %0d packet starts mid-way", o); end
        end else if (cur_src[o] != src) begin
          failures++; $display("FAIL out %0d interleaved packets", o);
        end
        left[o]--;
      end
    end
    for (int p = 0; p < NPORTS; p++) if (s_read[p]) void'(in_q[p].pop_front());
  end

  function automatic bit all_done();
    for (int p = 0; p < NPORTS; p++) begin
      if (in_q[p].size() != 0) return 0;
      for (int o = 0; o < NPORTS; o++) if (exp_q[o][p].size() != 0) return 0;
    end
    return 1;
  endfunction

  initial begin
    for (int o = 0; o < NPORTS; o++) begin cur_src[o] = 0; left[o] = 0; end
    repeat (3) @(negedge clk);
    rst = 0;
    // idle-router latency and rate
    random_full = 0;
    @(negedge clk);
    begin
      int t0;
      t0 = cyc;
      send(1, 0, 3, 4'b0100);
      wait (m_write[2]);
      check(cyc - t0 == 3, $sformatf("first word after %0d cycles", cyc - t0));
    end
    while (!all_done()) @(negedge clk);
    random_full = 1;
    // random traffic: port 0 may multicast, the others unicast
    for (int id = 1; id < 40; id++)
      for (int p = 0; p < NPORTS; p++)
        send(p, id, $urandom_range(0, 5),
             p == 0 ? NPORTS'($urandom_range(1, 15)) : NPORTS'(1) << $urandom_range(NPORTS - 1));
    send(0, 40, 4, 4'b1111);
    while (!all_done()) @(negedge clk);
    repeat (10) @(negedge clk);
    check(all_done(), "everything delivered");
    check(multicasts > 0, "multicast exercised");
    check(contention > 0, "contention exercised");
    check(full_stalls > 0, "back-pressure exercised");
    $display("delivered=%0d multicasts=%0d contention=%0d full_stalls=%0d", delivered, multicasts, contention, full_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
