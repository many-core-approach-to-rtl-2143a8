// tb_dct_multiplier -- checks pixel*((|cx|*|cy|)>>8) and the XOR of the
// signs, with one-cycle latency, for random and corner operands.
module tb_dct_multiplier;
  import dct_noc_pkg::*;
  logic clk = 0, rst = 1, enable = 0;
  logic [PIXEL_W-1:0] pixel = '0;
  logic [COS_W:0] cos_x = '0, cos_y = '0;
  logic ready, negative;
  logic [PROD_W-1:0] result;
  int checks = 0, failures = 0;

  dct_multiplier dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic apply(int px, int mx, bit sx, int my, bit sy);
    int exp;
    @(negedge clk);
    pixel = 8'(px); cos_x = {sx, 9'(mx)}; cos_y = {sy, 9'(my)}; enable = 1;
    @(negedge clk);
    enable = 0;
    exp = px * ((mx * my) / 256);
    check(ready, "ready");
    check(int'(result) == exp, $sformatf("px=%0d mx=%0d my=%0d got %0d exp %0d", px, mx, my, result, exp));
    check(negative == (sx ^ sy), "sign");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    apply(255, 256, 0, 256, 0);
    apply(255, 256, 1, 256, 0);
    apply(0, 200, 1, 100, 1);
    apply(128, 181, 0, 181, 1);
    repeat (500) apply($urandom_range(255), $urandom_range(256), 1'($urandom), $urandom_range(256), 1'($urandom));
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
