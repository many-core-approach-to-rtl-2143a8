// tb_dct_sum -- checks the accumulator against a model over random
// add/subtract sequences with idle cycles, the ready delay, and reset.
module tb_dct_sum;
  import dct_noc_pkg::*;
  logic clk = 0, rst = 1, enable = 0, negative = 0;
  logic [PROD_W-1:0] plus = '0;
  logic ready;
  logic [COEFF_W-1:0] result;
  int checks = 0, failures = 0;
  int model;

  dct_sum dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int run = 0; run < 4; run++) begin
      model = 0;
      for (int i = 0; i < 300; i++) begin
        bit en, ng;
        int v;
        en = ($urandom_range(3) != 0); ng = 1'($urandom); v = $urandom_range(65535);
        @(negedge clk);
        enable = en; negative = ng; plus = 16'(v);
        @(negedge clk);
        enable = 0;
        if (en) model = ng ? model - v : model + v;
        check(ready == en, "ready follows enable");
        check(result == COEFF_W'(model), $sformatf("acc got %0d exp %0d", $signed(result), model));
      end
      @(negedge clk); rst = 1;
      @(negedge clk); rst = 0;
      check(result == '0, "reset clears");
    end
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
