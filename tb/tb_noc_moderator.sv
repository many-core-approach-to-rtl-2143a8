// tb_noc_moderator -- checks the output arbiter: at most one grant, the
// granted manager's write and data routed to the output (nothing routed
// when unlocked), every request eventually served, and the round-robin rule:
// a manager that releases the output does not get it back while another
// manager has been waiting since before the release.
module tb_noc_moderator;
  import dct_noc_pkg::*;
  logic clk = 0, rst = 1;
  logic [NPORTS-1:0] write_in = '0, request = '0, grant;
  word_t [NPORTS-1:0] data_in = '0;
  logic out_write;
  word_t out_data;
  int checks = 0, failures = 0;
  int len [NPORTS];
  int wait_cycles [NPORTS];
  int granted_cycles [NPORTS];
  int rest [NPORTS];
  int last_release = -1;
  logic [NPORTS-1:0] waiting_at_release = '0;
  int handovers = 0, fairness_cases = 0, max_wait = 0;

  noc_moderator dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int p = 0; p < NPORTS; p++) begin wait_cycles[p] = 0; granted_cycles[p] = 0; rest[p] = 0; end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // observe the outputs of the current cycle
      check($countones(grant) <= 1, "one grant at most");
      if (grant != '0) begin
        int g;
        g = $clog2(grant);
        check(out_write == write_in[g], "write routed");
        check(out_data == data_in[g], "data routed");
        if (last_release >= 0) begin
          handovers++;
          if (waiting_at_release != '0) begin
            fairness_cases++;
            check(g != last_release || waiting_at_release[g], "released manager served again before a waiting one");
          end
          last_release = -1;
        end
      end else begin
        check(!out_write, "no write while nothing granted");
      end
      // update the managers for the next cycle
      for (int p = 0; p < NPORTS; p++) begin
        if (request[p] && !grant[p]) begin
          wait_cycles[p]++;
          if (wait_cycles[p] > max_wait) max_wait = wait_cycles[p];
        end
        if (grant[p]) begin
          wait_cycles[p] = 0;
          granted_cycles[p]++;
          if (granted_cycles[p] >= len[p]) begin
            request[p] = 0;
            granted_cycles[p] = 0;
            last_release = p;
            waiting_at_release = request & ~(NPORTS'(1) << p);
            rest[p] = 1;
          end
        end else if (!request[p]) begin
          if (rest[p] > 0) rest[p]--;
          else if ($urandom_range(3) == 0) begin
            request[p] = 1;
            len[p] = $urandom_range(1, 6);
          end
        end
        write_in[p] = 1'($urandom);
        data_in[p]  = $urandom;
      end
    end
    check(max_wait < 40, $sformatf("bounded wait (%0d)", max_wait));
    check(fairness_cases > 10, "contention happened");
    $display("handovers=%0d contended=%0d max_wait=%0d", handovers, fairness_cases, max_wait);
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
