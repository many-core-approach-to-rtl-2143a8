// dct_angle -- angle stage of the DCT coefficient pipeline.
//
// Forms the cosine argument (2*pos+1)*freq/(2N) of the DCT basis function for
// one axis. With the block side N a power of two (N = 2^LOG2_N) the division
// is a right shift, and doubling pos and adding one is a shift with a '1'
// appended, so only one small multiplier is left. The angle is returned in
// units of pi/(2N), modulo 2*pi, i.e. as the low LOG2_N+2 bits of the
// product: the top bit is worth 180 degrees and the next 90 degrees.
//
// Timing: pos, freq and pixel are registered when `enable` is high; `rad`,
// `pixel_buf` and `ready` (= enable one cycle late) are valid the cycle
// after. The shift-and-multiply structure follows the document; the register
// placement (inputs registered, product combinational) too.
module dct_angle
  import dct_noc_pkg::*;
#(
  parameter int unsigned LOG2_N = 3
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               enable,
  input  logic [PARAM_W-1:0] pos,
  input  logic [PARAM_W-1:0] freq,
  input  logic [PIXEL_W-1:0] pixel,
  output logic               ready,
  output logic [PIXEL_W-1:0] pixel_buf,
  output logic [LOG2_N+1:0]  rad
);
  logic [PARAM_W-1:0] pos_q, freq_q;
  logic [2*PARAM_W:0] product;

  always_ff @(posedge clk) begin
    if (rst) begin
      ready     <= 1'b0;
      pos_q     <= '0;
      freq_q    <= '0;
      pixel_buf <= '0;
    end else begin
      ready <= enable;
      if (enable) begin
        pos_q     <= pos;
        freq_q    <= freq;
        pixel_buf <= pixel;
      end
    end
  end

  always_comb begin
    product = {pos_q, 1'b1} * {{PARAM_W{1'b0}}, freq_q};
    rad     = product[LOG2_N+1:0];
  end
endmodule
