// tb_dct_cosine -- checks the cosine stage for every pair of angles of an
// 8x8 block: magnitude = round(|cos(a*pi/16)|*256), sign = sign of the real
// cosine wherever it is non-zero, pixel copy, and the one-cycle latency.
module tb_dct_cosine;
  import dct_noc_pkg::*;
  import tb_dct_ref_pkg::*;
  localparam int L = 3;
  logic clk = 0, rst = 1, enable = 0;
  logic [L+1:0] angle_x = '0, angle_y = '0;
  logic [PIXEL_W-1:0] pixel = '0;
  logic ready;
  logic [COS_W:0] cos_x, cos_y;
  logic [PIXEL_W-1:0] pixel_buf;
  int checks = 0, failures = 0;

  dct_cosine #(.LOG2_N(L)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_cos(logic [COS_W:0] c, int a, string axis);
    int m;
    m = ref_cos_mag(a, L);
    check(int'(c[COS_W-1:0]) == m, $sformatf("%s |cos| angle %0d got %0d exp %0d", axis, a, c[COS_W-1:0], m));
    if (m != 0) check(c[COS_W] == ref_cos_neg(a, L), $sformatf("%s sign angle %0d", axis, a));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int ax = 0; ax < 32; ax++) for (int ay = 0; ay < 32; ay += 3) begin
      int px;
      px = $urandom_range(255);
      @(negedge clk);
      angle_x = 5'(ax); angle_y = 5'(ay); pixel = 8'(px); enable = 1;
      @(negedge clk);
      enable = 0;
      check(ready, "ready after one cycle");
      check_cos(cos_x, ax, "x");
      check_cos(cos_y, ay, "y");
      check(int'(pixel_buf) == px, "pixel copy");
    end
    // Spot values of the table: cos(0)=1.0, cos(pi/2)=0, cos(pi/4)=181/256
    @(negedge clk); angle_x = 5'd0; angle_y = 5'd8; enable = 1;
    @(negedge clk); enable = 0;
    check(cos_x == 10'h100, "cos(0) = +1.0");
    check(cos_y[COS_W-1:0] == 0, "cos(pi/2) = 0");
    @(negedge clk); angle_x = 5'd4; angle_y = 5'd16; enable = 1;
    @(negedge clk); enable = 0;
    check(cos_x == 10'd181, "cos(pi/4) = 181/256");
    check(cos_y == {1'b1, 9'd256}, "cos(pi) = -1.0");
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
