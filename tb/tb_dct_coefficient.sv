// tb_dct_coefficient -- checks the coefficient block end to end: parameter
// loading, clear, the x-fastest pixel counter over a window, the four-level
// pipeline result against the fixed-point reference (bit exact) and the
// floating-point DCT (within 1%+2 of full scale), the latency from the last
// pixel to ready (4 clock edges), a single ready pulse, pixels beyond the
// window being ignored, and pixels arriving with idle gaps.
module tb_dct_coefficient;
  import dct_noc_pkg::*;
  import tb_dct_ref_pkg::*;
  localparam int L = 3;
  localparam int LATENCY = 4;
  logic clk = 0, rst = 1, enable = 0, clear = 0;
  logic [PIXEL_W-1:0] pixel = '0;
  logic [PARAM_W-1:0] param_a = '0, param_b = '0;
  logic load_x = 0, load_y = 0, load_freq = 0;
  logic ready;
  logic [COEFF_W-1:0] coeff;
  int checks = 0, failures = 0;
  int cyc = 0, ready_count = 0, ready_cyc = 0;
  int img [16][16];

  dct_coefficient #(.LOG2_N(L)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (ready) begin ready_count++; ready_cyc = cyc; end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic strobe(int which, int a, int b);
    @(negedge clk);
    param_a = PARAM_W'(a); param_b = PARAM_W'(b);
    load_x = (which == 0); load_y = (which == 1); load_freq = (which == 2); clear = (which == 3);
    @(negedge clk);
    {load_x, load_y, load_freq, clear} = '0;
  endtask

  task automatic run(int u, int v, int xi, int xf, int yi, int yf, int max_gap, int extra);
    longint exp;
    real fexp, tol;
    int last_edge;
    strobe(2, u, v);
    strobe(0, xi, xf);
    strobe(1, yi, yf);
    strobe(3, 0, 0);
    ready_count = 0;
    exp = 0; fexp = 0.0;
    for (int y = yi; y <= yf; y++)
      for (int x = xi; x <= xf; x++) begin
        repeat ($urandom_range(max_gap)) @(negedge clk);
        @(negedge clk);
        pixel = PIXEL_W'(img[y][x]); enable = 1;
        last_edge = cyc + 1;
        @(negedge clk);
        enable = 0;
        exp += ref_term(img[y][x], x, y, u, v, L);
        fexp += real_term(img[y][x], x, y, u, v, L);
      end
    // pixels past the end of the window must be ignored
    repeat (extra) begin
      @(negedge clk); pixel = 8'hFF; enable = 1;
      @(negedge clk); enable = 0;
    end
    repeat (20) @(negedge clk);
    check(ready_count == 1, $sformatf("one ready pulse (got %0d)", ready_count));
    check(ready_cyc - last_edge == LATENCY, $sformatf("latency %0d", ready_cyc - last_edge));
    check(coeff == wrap24(exp), $sformatf("u=%0d v=%0d [%0d:%0d]x[%0d:%0d] got %0d exp %0d",
                                          u, v, xi, xf, yi, yf, $signed(coeff), exp));
    tol = 0.01 * 255.0 * real'((xf - xi + 1) * (yf - yi + 1)) + 2.0;
    if (xf < 8 && yf < 8) begin
      real got, diff;
      got  = real'($signed(coeff)) / 256.0;
      diff = got - fexp;
      if (diff < 0.0) diff = -diff;
      check(diff <= tol, $sformatf("float DCT u=%0d v=%0d got %f exp %f", u, v, got, fexp));
    end
  endtask

  initial begin
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) img[y][x] = $urandom_range(255);
    repeat (3) @(negedge clk);
    rst = 0;
    // every coefficient of a full 8x8 block, back-to-back pixels
    for (int u = 0; u < 8; u++) for (int v = 0; v < 8; v++) run(u, v, 0, 7, 0, 7, 0, (u == 0 && v == 0) ? 3 : 0);
    // partial windows, gaps between pixels
    run(2, 5, 0, 0, 0, 0, 3, 2);
    run(1, 3, 0, 7, 2, 2, 2, 0);
    run(7, 7, 0, 7, 0, 3, 4, 1);
    run(3, 6, 2, 5, 1, 6, 1, 0);
    // a window larger than one block (angles wrap modulo 2*pi)
    run(1, 2, 0, 15, 0, 15, 0, 0);
    // all pixels at 255: the DC term is the largest value
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) img[y][x] = 255;
    run(0, 0, 0, 7, 0, 7, 0, 0);
    check(coeff == 24'(64 * 255 * 256), "DC of a white block");
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
