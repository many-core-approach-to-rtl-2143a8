// tb_dct_core -- drives one DCT core through its FSL links as the
// controller would: configure (frequency, x window, y window, clear),
// stream the window's pixels, read the reply. Checks the reply header and
// {ID, coefficient} against the fixed-point reference for all 64
// coefficients of a block and some partial and random windows, reuse of the same core
// for successive coefficients, and the time from the last pixel being
// offered to the reply header being written (7 cycles on an unstalled link).
module tb_dct_core;
  import dct_noc_pkg::*;
  import tb_dct_ref_pkg::*;
  localparam int L = 3;
  localparam logic [7:0] MY_ID = 8'd2;
  localparam int REPLY_DELAY = 7;
  logic clk = 0, rst = 1;
  logic s_read, s_exists = 0, m_write, m_full = 0;
  word_t s_data = '0, m_data;
  int checks = 0, failures = 0, cyc = 0, last_offer = 0;
  word_t in_q[$];
  word_t out_q[$];
  int out_cyc[$];
  int img [8][8];

  dct_core #(.ID(MY_ID), .LOG2_N(L)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  // The link model refreshes its outputs every falling edge
  always @(negedge clk) begin
    s_exists = (in_q.size() != 0);
    s_data   = s_exists ? in_q[0] : '0;
  end
  always @(posedge clk) if (!rst) begin
    if (s_read) begin
      if (in_q.size() == 1) last_offer = cyc;
      void'(in_q.pop_front());
    end
    if (m_write) begin out_q.push_back(m_data); out_cyc.push_back(cyc); end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(int u, int v, int xi, int xf, int yi, int yf);
    longint exp;
    in_q.push_back({4'b0010, 8'h0, 10'(v), 10'(u)});
    in_q.push_back({4'b1000, 8'h0, 10'(xf), 10'(xi)});
    in_q.push_back({4'b0100, 8'h0, 10'(yf), 10'(yi)});
    in_q.push_back({4'b0001, 28'h0});
    exp = 0;
    for (int y = yi; y <= yf; y++) for (int x = xi; x <= xf; x++) begin
      in_q.push_back({24'h0, 8'(img[y][x])});
      exp += ref_term(img[y][x], x, y, u, v, L);
    end
    while (out_q.size() < 2) @(negedge clk);
    check(out_q[0] == make_header(16'd1, 4'b0001), $sformatf("header %h", out_q[0]));
    check(out_q[1] == {MY_ID, wrap24(exp)}, $sformatf("u=%0d v=%0d got %h exp %h", u, v, out_q[1], {MY_ID, wrap24(exp)}));
    check(out_cyc[0] - last_offer == REPLY_DELAY, $sformatf("reply delay %0d", out_cyc[0] - last_offer));
    out_q.delete(); out_cyc.delete();
  endtask

  initial begin
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) img[y][x] = $urandom_range(255);
    repeat (3) @(negedge clk);
    rst = 0;
    for (int u = 0; u < 8; u++) for (int v = 0; v < 8; v++) run(u, v, 0, 7, 0, 7);
    run(1, 1, 0, 0, 0, 0);
    run(2, 3, 0, 7, 0, 0);
    run(5, 4, 0, 7, 0, 3);
    run(6, 1, 3, 6, 2, 7);
    // random rectangular windows, x and y ranges drawn independently
    for (int k = 0; k < 24; k++) begin
      int xi, xf, yi, yf;
      xi = $urandom_range(7); xf = $urandom_range(7, xi);
      yi = $urandom_range(7); yf = $urandom_range(7, yi);
      run($urandom_range(7), $urandom_range(7), xi, xf, yi, yf);
    end
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
