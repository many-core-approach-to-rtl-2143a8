// tb_dct_core_io -- checks the communication/control block of a DCT core:
// decoding of load_x/load_y/load_freq/clear words (parameters A and B) and
// pixel words into one-cycle strobes the cycle after the word is offered,
// that every offered word is read, the reply packet (header for one word to
// port 0, then {ID, coefficient}) and that the reply waits while the
// outgoing link is full.
module tb_dct_core_io;
  import dct_noc_pkg::*;
  localparam logic [7:0] MY_ID = 8'd5;
  logic clk = 0, rst = 1;
  logic s_read, s_exists = 0, m_write, m_full = 0;
  word_t s_data = '0, m_data;
  logic coeff_ready = 0;
  logic [COEFF_W-1:0] coeff = '0;
  logic coeff_enable, coeff_clear, load_x, load_y, load_freq;
  logic [PIXEL_W-1:0] pixel;
  logic [PARAM_W-1:0] param_a, param_b;
  int checks = 0, failures = 0, stalled = 0;
  word_t out_q[$];

  always @(posedge clk) if (!rst && m_write) out_q.push_back(m_data);

  dct_core_io #(.ID(MY_ID), .RETURN_PORT(0)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic offer(word_t w, logic [4:0] exp_strobes, int a, int b, int px);
    @(negedge clk);
    s_data = w; s_exists = 1;
    check(s_read, "word is read at once");
    @(negedge clk);
    s_exists = 0; s_data = $urandom;
    check({load_x, load_y, load_freq, coeff_clear, coeff_enable} == exp_strobes,
          $sformatf("strobes %b for word %h", {load_x, load_y, load_freq, coeff_clear, coeff_enable}, w));
    if (exp_strobes[4:2] != 0) check(int'(param_a) == a && int'(param_b) == b, "parameters A/B");
    if (exp_strobes[0]) check(int'(pixel) == px, "pixel value");
    @(negedge clk);
    check({load_x, load_y, load_freq, coeff_clear, coeff_enable} == '0, "strobes last one cycle");
  endtask

  task automatic reply(logic [23:0] c, int full_cycles);
    out_q.delete();
    @(negedge clk);
    coeff = c; coeff_ready = 1;
    m_full = (full_cycles > 0);
    @(negedge clk);
    coeff_ready = 0; coeff = $urandom;
    for (int i = 0; i < 30 && out_q.size() < 2; i++) begin
      if (i >= full_cycles) m_full = 0;
      if (m_full) begin
        stalled++;
        check(out_q.size() == 0, "nothing written while full");
      end
      @(negedge clk);
    end
    repeat (3) @(negedge clk);
    check(out_q.size() == 2, "two reply words");
    if (out_q.size() == 2) begin
      check(out_q[0] == 32'h0001_0800, $sformatf("reply header %h", out_q[0]));
      check(out_q[1] == {MY_ID, c}, $sformatf("reply data %h", out_q[1]));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 100; i++) begin
      int a, b, px;
      a = $urandom_range(1023); b = $urandom_range(1023); px = $urandom_range(255);
      offer({4'b1000, 8'h00, 10'(b), 10'(a)}, 5'b10000, a, b, 0);
      offer({4'b0100, 8'h00, 10'(b), 10'(a)}, 5'b01000, a, b, 0);
      offer({4'b0010, 8'h00, 10'(b), 10'(a)}, 5'b00100, a, b, 0);
      offer({4'b0001, 28'h0}, 5'b00010, 0, 0, 0);
      offer({24'h0, 8'(px)}, 5'b00001, 0, 0, px);
    end
    reply(24'h123456, 0);
    reply(24'hFEDCBA, 5);
    for (int i = 0; i < 20; i++) reply(24'($urandom), $urandom_range(3));
    check(stalled > 0, "output stalled by a full link");
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
