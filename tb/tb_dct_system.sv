// tb_dct_system -- end-to-end test of the many-core DCT system at its
// default parameters (8x8 blocks, three cores, 16-word links).
//
// A behavioural controller on router port 0 plays the role of the soft
// processor: it configures each core with a unicast packet (frequency,
// x window, y window, clear), multicasts the pixels once to all cores in use,
// and gathers the {ID, coefficient} replies, adding partial results where a
// coefficient was split between cores. Every coefficient is compared bit for
// bit with the fixed-point reference and, for whole blocks, with the
// floating-point DCT.
//
// Phases:
//   1. one core, windows of 1 pixel, 1 line, half a block and a whole block
//   2. a full 8x8 DCT with 1, 2 and 3 cores (cores reused for 64 coefficients)
//   3. one coefficient split into two half-block windows on two cores
//   4. a full 8x8 DCT with 3 cores where the controller reads the replies
//      only after several rounds, so the link towards it fills up
// Each mechanism is counted (unicast, multicast, partial sum, core reuse,
// controller write stalled by a full link, two or more cores contending for
// port 0, reply held back by a full port-0 link); one that never happens is
// a failure. Cycle counts per phase are printed.
module tb_dct_system;
  import dct_noc_pkg::*;
  import tb_dct_ref_pkg::*;
  localparam int L = 3;
  localparam int NB = 8;
  localparam int NCORES = 3;

  logic clk = 0, rst = 1;
  logic ctrl_m_write = 0, ctrl_m_full, ctrl_s_read = 0, ctrl_s_exists;
  word_t ctrl_m_data = '0, ctrl_s_data;
  int checks = 0, failures = 0, cyc = 0;
  int img [NB][NB];
  word_t rx_q[$];
  bit read_enable = 1;

  // mechanism counters
  int n_unicast = 0, n_multicast = 0, n_partial = 0, n_reuse = 0;
  int n_ctrl_stall = 0, n_contention = 0, n_port0_full = 0, n_ignored = 0;

  dct_system dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (!rst) begin
    if (ctrl_s_read && ctrl_s_exists) rx_q.push_back(ctrl_s_data);
    if ($countones(dut.u_router.mod_req[0]) > 1) n_contention++;
    if (dut.out_full[0] && dut.u_router.mod_req[0] != '0) n_port0_full++;
  end
  always @(negedge clk) ctrl_s_read = read_enable;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic ctrl_write(word_t w);
    @(negedge clk);
    while (ctrl_m_full) begin
      n_ctrl_stall++;
      @(negedge clk);
    end
    ctrl_m_write = 1; ctrl_m_data = w;
    @(negedge clk);
    ctrl_m_write = 0;
  endtask

  task automatic configure(int core, int u, int v, int xi, int xf, int yi, int yf);
    ctrl_write(make_header(16'd4, NPORTS'(1) << (core + 1)));
    ctrl_write({4'b0010, 8'h0, 10'(v), 10'(u)});
    ctrl_write({4'b1000, 8'h0, 10'(xf), 10'(xi)});
    ctrl_write({4'b0100, 8'h0, 10'(yf), 10'(yi)});
    ctrl_write({4'b0001, 28'h0});
    n_unicast++;
  endtask

  task automatic send_pixels(logic [NPORTS-1:0] mask, int xi, int xf, int yi, int yf);
    ctrl_write(make_header(16'((xf - xi + 1) * (yf - yi + 1)), mask));
    for (int y = yi; y <= yf; y++) for (int x = xi; x <= xf; x++) ctrl_write({24'h0, 8'(img[y][x])});
    if ($countones(mask) > 1) n_multicast++;
  endtask

  // Wait for n replies; return them indexed by core ID.
  task automatic collect(int n, output logic [23:0] val [NCORES], output bit got [NCORES]);
    int t0;
    t0 = cyc;
    for (int c = 0; c < NCORES; c++) begin got[c] = 0; val[c] = '0; end
    while (rx_q.size() < n && cyc - t0 < 5000) @(negedge clk);
    check(rx_q.size() >= n, $sformatf("%0d replies arrived (got %0d)", n, rx_q.size()));
    for (int i = 0; i < n && rx_q.size() > 0; i++) begin
      word_t w;
      int id;
      w = rx_q.pop_front();
      id = int'(w[31:24]);
      check(id < NCORES && !got[id], $sformatf("reply from core %0d", id));
      if (id < NCORES) begin got[id] = 1; val[id] = w[23:0]; end
    end
  endtask

  function automatic logic [23:0] ref_coeff(int u, int v, int xi, int xf, int yi, int yf);
    longint s;
    s = 0;
    for (int y = yi; y <= yf; y++) for (int x = xi; x <= xf; x++) s += ref_term(img[y][x], x, y, u, v, L);
    return wrap24(s);
  endfunction

  function automatic real float_coeff(int u, int v);
    real s;
    s = 0.0;
    for (int y = 0; y < NB; y++) for (int x = 0; x < NB; x++) s += real_term(img[y][x], x, y, u, v, L);
    return s;
  endfunction

  task automatic check_full(int u, int v, logic [23:0] got, string tag);
    real r, d;
    check(got == ref_coeff(u, v, 0, NB - 1, 0, NB - 1),
          $sformatf("%s X(%0d,%0d) got %0d exp %0d", tag, u, v, $signed(got), $signed(ref_coeff(u, v, 0, NB - 1, 0, NB - 1))));
    r = real'($signed(got)) / 256.0;
    d = r - float_coeff(u, v);
    if (d < 0.0) d = -d;
    check(d < 0.01 * 255.0 * 64.0, $sformatf("%s X(%0d,%0d) close to the exact DCT", tag, u, v));
  endtask

  // Full 8x8 DCT using `ncores` cores; replies read every `rounds_per_read` rounds.
  task automatic full_dct(int ncores, int rounds_per_read, string tag);
    int t0, k, round, pending_rounds;
    int pend_u [$], pend_v [$], pend_n [$];
    t0 = cyc;
    k = 0; round = 0;
    while (k < NB * NB) begin
      int used;
      logic [NPORTS-1:0] mask;
      used = (NB * NB - k < ncores) ? NB * NB - k : ncores;
      mask = '0;
      for (int c = 0; c < used; c++) begin
        configure(c, (k + c) % NB, (k + c) / NB, 0, NB - 1, 0, NB - 1);
        mask[c + 1] = 1'b1;
        pend_u.push_back((k + c) % NB); pend_v.push_back((k + c) / NB);
      end
      pend_n.push_back(used);
      send_pixels(mask, 0, NB - 1, 0, NB - 1);
      if (round > 0) n_reuse++;
      round++;
      k += used;
      if (pend_n.size() >= rounds_per_read || k >= NB * NB) begin
        // read everything outstanding, round by round
        read_enable = 1;
        while (pend_n.size() > 0) begin
          logic [23:0] val [NCORES];
          bit got [NCORES];
          int n;
          n = pend_n.pop_front();
          collect(n, val, got);
          for (int c = 0; c < n; c++) begin
            int u, v;
            u = pend_u.pop_front(); v = pend_v.pop_front();
            check(got[c], $sformatf("%s core %0d answered", tag, c));
            if (got[c]) check_full(u, v, val[c], tag);
          end
        end
        if (rounds_per_read > 1 && k < NB * NB) read_enable = 0;
      end else if (rounds_per_read > 1) begin
        read_enable = 0;
      end
    end
    read_enable = 1;
    $display("%s: full 8x8 DCT with %0d core(s): %0d cycles", tag, ncores, cyc - t0);
  endtask

  initial begin
    for (int y = 0; y < NB; y++) for (int x = 0; x < NB; x++) img[y][x] = $urandom_range(255);
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (2) @(negedge clk);

    // ---- Phase 1: one core, growing windows (1 pixel, 1 line, half, full)
    begin
      int sizes_yf [4];
      int sizes_xf [4];
      sizes_xf = '{0, 7, 7, 7};
      sizes_yf = '{0, 0, 3, 7};
      for (int s = 0; s < 4; s++) begin
        logic [23:0] val [NCORES];
        bit got [NCORES];
        int t0, u, v;
        u = $urandom_range(7); v = $urandom_range(7);
        t0 = cyc;
        configure(0, u, v, 0, sizes_xf[s], 0, sizes_yf[s]);
        send_pixels(4'b0010, 0, sizes_xf[s], 0, sizes_yf[s]);
        collect(1, val, got);
        check(got[0] && val[0] == ref_coeff(u, v, 0, sizes_xf[s], 0, sizes_yf[s]),
              $sformatf("single core window %0d pixels", (sizes_xf[s] + 1) * (sizes_yf[s] + 1)));
        $display("single core, %0d pixel(s): %0d cycles", (sizes_xf[s] + 1) * (sizes_yf[s] + 1), cyc - t0);
      end
    end

    // ---- Phase 2: full DCT on 1, 2 and 3 cores
    full_dct(1, 1, "phase2");
    full_dct(2, 1, "phase2");
    full_dct(3, 1, "phase2");

    // ---- Phase 3: a coefficient split in two halves on two cores
    for (int rep = 0; rep < 4; rep++) begin
      logic [23:0] val [NCORES];
      bit got [NCORES];
      int u, v;
      u = $urandom_range(7); v = $urandom_range(7);
      configure(0, u, v, 0, NB - 1, 0, 3);
      configure(1, u, v, 0, NB - 1, 4, 7);
      send_pixels(4'b0010, 0, NB - 1, 0, 3);
      send_pixels(4'b0100, 0, NB - 1, 4, 7);
      collect(2, val, got);
      check(got[0] && got[1], "both halves answered");
      check_full(u, v, val[0] + val[1], "partial");
      n_partial++;
    end

    // ---- Phase 3b: more pixels than the window; the surplus is ignored
    begin
      logic [23:0] val [NCORES];
      bit got [NCORES];
      configure(2, 3, 5, 0, NB - 1, 0, 1);
      send_pixels(4'b1000, 0, NB - 1, 0, NB - 1);
      collect(1, val, got);
      check(got[2] && val[2] == ref_coeff(3, 5, 0, NB - 1, 0, 1), "surplus pixels ignored");
      n_ignored++;
    end

    // ---- Phase 4: replies left unread for 7 rounds (21 words > 16-word link)
    full_dct(3, 7, "phase4");

    repeat (20) @(negedge clk);
    check(rx_q.size() == 0, "no stray replies");
    $display("mechanisms: unicast=%0d multicast=%0d reuse=%0d partial=%0d surplus=%0d ctrl_stall=%0d contention=%0d port0_full=%0d",
             n_unicast, n_multicast, n_reuse, n_partial, n_ignored, n_ctrl_stall, n_contention, n_port0_full);
    check(n_unicast > 0, "unicast configuration happened");
    check(n_multicast > 0, "multicast of pixels happened");
    check(n_reuse > 0, "cores were reused");
    check(n_partial > 0, "partial windows were summed");
    check(n_ignored > 0, "surplus pixels were sent");
    check(n_ctrl_stall > 0, "controller was stalled by a full link");
    check(n_contention > 0, "cores contended for port 0");
    check(n_port0_full > 0, "replies were held back by a full link");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
