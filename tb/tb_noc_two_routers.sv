// tb_noc_two_routers -- two routers joined by a pair of FIFO links, to check
// that a packet crosses several routers by carrying one header per router.
//
// Router A port 3 and router B port 0 are joined by two fsl_fifo links, one
// in each direction. The other six ports are endpoints: A0, A1, A2 (numbered
// 0..2) and B1, B2, B3 (numbered 3..5), driven and checked directly by the
// testbench. A packet for an endpoint on the other router starts with two
// headers. The first one, of size n+1, sends the packet to the joining port.
// The second one, of size n, is consumed by the far router and names the
// final port or ports. Each header is read and dropped by the router it
// addresses, so only the payload arrives. One header per router crossed is
// the reference design's rule. The two-router arrangement and the link depth
// of 4 are this testbench's own choices.
//
// Checks:
// - every payload word reaches each endpoint named, in order, exactly once;
// - no header word ever reaches an endpoint;
// - packets do not interleave on an endpoint;
// - an endpoint whose link is full is never written;
// - a multicast to several ports of the far router arrives at all of them.
// Only endpoint 0 multicasts, locally or on the far router, as a packet can
// be copied only within the router whose header names several ports.
//
// Timing: on idle routers, the first payload word of a two-router packet is
// written to its endpoint 8 cycles after the first header is offered. Router A
// spends 3 cycles on the inner header, which is payload to it, and 3 more on
// the first real payload word. The link adds 1 cycle, and router B, which has
// consumed the inner header meanwhile, writes the word 1 cycle after it
// appears. From then on a word arrives every 3 cycles.
module tb_noc_two_routers;
  import dct_noc_pkg::*;
  localparam int NEP = 6;

  logic clk = 0, rst = 1;
  int checks = 0, failures = 0, cyc = 0;

  // Router-side signals of both routers
  logic  [NPORTS-1:0] a_s_read, a_s_exists, a_m_write, a_m_full;
  word_t [NPORTS-1:0] a_s_data, a_m_data;
  logic  [NPORTS-1:0] b_s_read, b_s_exists, b_m_write, b_m_full;
  word_t [NPORTS-1:0] b_s_data, b_m_data;

  // Endpoint side, as seen by the testbench
  logic  [NEP-1:0] ep_exists, ep_read, ep_write, ep_full;
  word_t [NEP-1:0] ep_in_data, ep_out_data;

  word_t in_q [NEP][$];
  word_t exp_q [NEP][NEP][$];   // [destination][source]
  int    pkt_len [NEP][int];
  int    cur_src [NEP], left [NEP];
  int    remote = 0, remote_multicast = 0, local_multicast = 0, full_stalls = 0;
  bit    random_full = 1;

  noc_router u_a (.clk, .rst, .s_read(a_s_read), .s_data(a_s_data), .s_exists(a_s_exists),
                  .m_write(a_m_write), .m_data(a_m_data), .m_full(a_m_full));
  noc_router u_b (.clk, .rst, .s_read(b_s_read), .s_data(b_s_data), .s_exists(b_s_exists),
                  .m_write(b_m_write), .m_data(b_m_data), .m_full(b_m_full));

  // A port 3 -> B port 0
  fsl_fifo #(.DEPTH(4)) u_ab (.clk, .rst,
    .m_write(a_m_write[3]), .m_data(a_m_data[3]), .m_full(a_m_full[3]),
    .s_read(b_s_read[0]), .s_data(b_s_data[0]), .s_exists(b_s_exists[0]));
  // B port 0 -> A port 3
  fsl_fifo #(.DEPTH(4)) u_ba (.clk, .rst,
    .m_write(b_m_write[0]), .m_data(b_m_data[0]), .m_full(b_m_full[0]),
    .s_read(a_s_read[3]), .s_data(a_s_data[3]), .s_exists(a_s_exists[3]));

  // Endpoint e on router (e < 3 ? A : B), port (e < 3 ? e : e - 2)
  always_comb begin
    for (int e = 0; e < 3; e++) begin
      a_s_exists[e]     = ep_exists[e];
      a_s_data[e]       = ep_in_data[e];
      ep_read[e]        = a_s_read[e];
      ep_write[e]       = a_m_write[e];
      ep_out_data[e]    = a_m_data[e];
      a_m_full[e]       = ep_full[e];
      b_s_exists[e + 1] = ep_exists[e + 3];
      b_s_data[e + 1]   = ep_in_data[e + 3];
      ep_read[e + 3]    = b_s_read[e + 1];
      ep_write[e + 3]   = b_m_write[e + 1];
      ep_out_data[e + 3] = b_m_data[e + 1];
      b_m_full[e + 1]   = ep_full[e + 3];
    end
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    for (int e = 0; e < NEP; e++) begin
      ep_exists[e]  = (in_q[e].size() != 0);
      ep_in_data[e] = ep_exists[e] ? in_q[e][0] : '0;
    end
    ep_full = random_full ? NEP'($urandom & $urandom) : '0;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Router-local port mask of a set of endpoints on one router
  function automatic logic [NPORTS-1:0] local_mask(logic [NEP-1:0] dst, bit on_b);
    logic [NPORTS-1:0] m;
    m = '0;
    for (int e = 0; e < NEP; e++)
      if (dst[e] && (e >= 3) == on_b) m[on_b ? e - 2 : e] = 1'b1;
    return m;
  endfunction

  // Send `size` payload words from endpoint `src` to the endpoints in `dst`,
  // which must all be on one router.
  task automatic send(int src, int id, int size, logic [NEP-1:0] dst);
    bit src_b, dst_b;
    src_b = (src >= 3);
    dst_b = (dst[5:3] != '0);
    if (src_b != dst_b) begin
      in_q[src].push_back(make_header(16'(size + 1), NPORTS'(1) << (src_b ? 0 : 3)));
      remote++;
      if ($countones(dst) > 1) remote_multicast++;
    end else if ($countones(dst) > 1) local_multicast++;
    in_q[src].push_back(make_header(16'(size), local_mask(dst, dst_b)));
    pkt_len[src][id] = size;
    for (int i = 0; i < size; i++) begin
      word_t w;
      w = {4'(src), 12'(id), 16'(i)};
      in_q[src].push_back(w);
      for (int e = 0; e < NEP; e++) if (dst[e]) exp_q[e][src].push_back(w);
    end
  endtask

  always @(posedge clk) if (!rst) begin
    for (int e = 0; e < NEP; e++) begin
      if (ep_full[e] && !ep_write[e] && (e < 3 ? u_a.mod_req[e] : u_b.mod_req[e - 2]) != '0)
        full_stalls++;
      if (ep_write[e]) begin
        int src, id, idx;
        word_t w;
        w = ep_out_data[e];
        src = int'(w[31:28]); id = int'(w[27:16]); idx = int'(w[15:0]);
        check(!ep_full[e], $sformatf("endpoint %0d written while full", e));
        checks++;
        if (src >= NEP || exp_q[e][src].size() == 0 || exp_q[e][src][0] != w) begin
          failures++; $display("FAIL endpoint %0d unexpected word %h", e, w);
        end else void'(exp_q[e][src].pop_front());
        checks++;
        if (left[e] == 0) begin
          cur_src[e] = src;
          left[e] = (src < NEP && pkt_len[src].exists(id)) ? pkt_len[src][id] : 1;
          if (idx != 0) begin failures++; $display("FAIL endpoint %0d packet starts mid-way", e); end
        end else if (cur_src[e] != src) begin
          failures++; $display("FAIL endpoint %0d interleaved packets", e);
        end
        left[e]--;
      end
      if (ep_read[e]) void'(in_q[e].pop_front());
    end
  end

  function automatic bit all_done();
    for (int s = 0; s < NEP; s++) begin
      if (in_q[s].size() != 0) return 0;
      for (int d = 0; d < NEP; d++) if (exp_q[d][s].size() != 0) return 0;
    end
    return 1;
  endfunction

  // Random destination set for a packet from `src`
  function automatic logic [NEP-1:0] pick_dst(int src);
    bit far_b;
    logic [NEP-1:0] d;
    far_b = 1'($urandom_range(1));
    if (src == 0) begin
      // any non-empty set of ports on one router
      d = far_b ? {3'($urandom_range(1, 7)), 3'b000} : {3'b000, 3'($urandom_range(1, 7))};
    end else begin
      d = NEP'(1) << (far_b ? 3 + $urandom_range(2) : $urandom_range(2));
    end
    return d;
  endfunction

  initial begin
    for (int e = 0; e < NEP; e++) begin cur_src[e] = 0; left[e] = 0; end
    repeat (3) @(negedge clk);
    rst = 0;
    // latency across both routers on an idle network
    random_full = 0;
    @(negedge clk);
    begin
      int t0;
      t0 = cyc;
      send(1, 0, 4, 6'b010000);            // A1 -> B2
      wait (ep_write[4]);
      check(cyc - t0 == 8, $sformatf("two-router first word after %0d cycles", cyc - t0));
    end
    while (!all_done()) @(negedge clk);
    // broadcast to every port of the far router
    send(0, 1, 3, 6'b111000);
    while (!all_done()) @(negedge clk);
    random_full = 1;
    for (int id = 2; id < 40; id++)
      for (int s = 0; s < NEP; s++)
        send(s, id, $urandom_range(0, 5), pick_dst(s));
    while (!all_done()) @(negedge clk);
    repeat (10) @(negedge clk);
    check(all_done(), "everything delivered");
    check(remote > 0, "packets crossed both routers");
    check(remote_multicast > 0, "multicast on the far router");
    check(local_multicast > 0, "multicast on the near router");
    check(full_stalls > 0, "back-pressure exercised");
    $display("remote=%0d remote_multicast=%0d local_multicast=%0d full_stalls=%0d",
             remote, remote_multicast, local_multicast, full_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
