// dct_sum -- sum stage of the DCT coefficient pipeline.
//
// Accumulates the products of one coefficient: each cycle `enable` is high,
// the 16-bit magnitude `plus` is added to the 24-bit two's-complement
// accumulator, or subtracted when `negative` is set. `result` carries 8
// fraction bits. A full 8x8 block needs at most 64*255*256 < 2^23, so the
// accumulator cannot overflow there; a larger window wraps. `rst` (system
// reset or the core's clear command) zeroes it.
//
// Timing: `ready` is `enable` delayed one cycle; `result` includes the
// operand from the previous cycle. Widths follow the document.
module dct_sum
  import dct_noc_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               enable,
  input  logic [PROD_W-1:0]  plus,
  input  logic               negative,
  output logic               ready,
  output logic [COEFF_W-1:0] result
);
  logic [COEFF_W-1:0] operand;
  assign operand = {{(COEFF_W-PROD_W){1'b0}}, plus};

  always_ff @(posedge clk) begin
    if (rst) begin
      ready  <= 1'b0;
      result <= '0;
    end else begin
      ready <= enable;
      if (enable) result <= negative ? result - operand : result + operand;
    end
  end
endmodule
