// dct_core -- DCT dedicated core: a network end point that computes one
// 2D-DCT coefficient at a time.
//
// It joins the communication/control block (dct_core_io) to the coefficient
// calculation block (dct_coefficient). Seen from the network it has one
// incoming and one outgoing FSL link. A controller configures it with three
// words (frequency u,v; x window; y window), clears it, then streams the
// window's pixels (x fastest); the core answers with a two-word packet,
// header then {ID, coefficient}, to port RETURN_PORT of its router.
//
// Timing: one pixel per clock accepted; the reply header is written 7 cycles
// after the last pixel is offered on an unstalled link (1 input register,
// 4 pipeline levels, 1 end detection, 1 output state). Structure and
// parameters follow the document (ID, N = 2^LOG2_N = 8).
module dct_core
  import dct_noc_pkg::*;
#(
  parameter logic [7:0]  ID          = 8'd0,
  parameter int unsigned LOG2_N      = 3,
  parameter int unsigned RETURN_PORT = 0
) (
  input  logic  clk,
  input  logic  rst,
  output logic  s_read,
  input  word_t s_data,
  input  logic  s_exists,
  output logic  m_write,
  output word_t m_data,
  input  logic  m_full
);
  logic               coeff_ready, coeff_enable, coeff_clear;
  logic [COEFF_W-1:0] coeff;
  logic [PIXEL_W-1:0] pixel;
  logic [PARAM_W-1:0] param_a, param_b;
  logic               load_x, load_y, load_freq;

  dct_core_io #(.ID(ID), .RETURN_PORT(RETURN_PORT)) u_io (
    .clk, .rst, .s_read, .s_data, .s_exists, .m_write, .m_data, .m_full,
    .coeff_ready, .coeff, .coeff_enable, .coeff_clear, .pixel, .param_a,
    .param_b, .load_x, .load_y, .load_freq
  );

  dct_coefficient #(.LOG2_N(LOG2_N)) u_coeff (
    .clk, .rst, .enable(coeff_enable), .clear(coeff_clear), .pixel, .param_a,
    .param_b, .load_x, .load_y, .load_freq, .ready(coeff_ready), .coeff
  );
endmodule
