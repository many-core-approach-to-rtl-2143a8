// tb_dct_angle -- checks the angle stage: (2*pos+1)*freq modulo 2^(L+2),
// the pixel copy, one-cycle latency of ready, and that the registers hold
// when enable is low. Random operands plus all pos/freq pairs of an 8x8 block.
module tb_dct_angle;
  import dct_noc_pkg::*;
  import tb_dct_ref_pkg::*;
  localparam int L = 3;
  logic clk = 0, rst = 1, enable = 0;
  logic [PARAM_W-1:0] pos = '0, freq = '0;
  logic [PIXEL_W-1:0] pixel = '0;
  logic ready;
  logic [PIXEL_W-1:0] pixel_buf;
  logic [L+1:0] rad;
  int checks = 0, failures = 0;

  dct_angle #(.LOG2_N(L)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic apply(int p, int f, int px);
    int exp_rad, exp_px;
    @(negedge clk);
    pos = PARAM_W'(p); freq = PARAM_W'(f); pixel = PIXEL_W'(px); enable = 1;
    @(negedge clk);
    enable = 0;
    exp_rad = ref_angle(p, f, L); exp_px = px;
    check(ready == 1'b1, "ready one cycle after enable");
    check(int'(rad) == exp_rad, $sformatf("rad pos=%0d freq=%0d got %0d exp %0d", p, f, rad, exp_rad));
    check(int'(pixel_buf) == exp_px, "pixel copy");
    // hold with enable low
    pos = PARAM_W'($urandom); freq = PARAM_W'($urandom);
    @(negedge clk);
    check(ready == 1'b0, "ready drops");
    check(int'(rad) == exp_rad, "rad held while enable low");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int p = 0; p < 8; p++) for (int f = 0; f < 8; f++) apply(p, f, $urandom_range(255));
    repeat (200) apply($urandom_range(1023), $urandom_range(1023), $urandom_range(255));
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
