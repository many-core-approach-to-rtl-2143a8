// dct_coefficient -- coefficient calculation block of a DCT core.
//
// Computes one 2D-DCT coefficient (unnormalised)
//   X(u,v) = sum_{x=xi..xf} sum_{y=yi..yf} f(x,y) cos((2x+1)u*pi/2N) cos((2y+1)v*pi/2N)
// over a configurable window of the image, one pixel per `enable` cycle.
// The pipeline has the four levels of the document: angle (two dct_angle,
// one per axis), cosine (dct_cosine), multiplication (dct_multiplier) and sum
// (dct_sum), one clock each.
//
// Configuration (values on param_a / param_b, taken when a load strobe is high):
//   load_x    : xi = param_a, xf = param_b
//   load_y    : yi = param_a, yf = param_b
//   load_freq : u  = param_a, v  = param_b
// `clear` empties the pipeline, zeroes the accumulator and restarts the
// position counter at (xi, yi); it must therefore follow the loads.
//
// Pixel order: x advances fastest, then y (f(xi,yi), f(xi+1,yi), ...,
// f(xi,yi+1), ..., f(xf,yf)). After f(xf,yf) further pixels are ignored.
// When the last pixel has left the sum stage and the pipeline is empty,
// `ready` pulses for one cycle with the final value on `coeff` (24-bit two's
// complement, 8 fraction bits). Latency: `ready` is set by the fourth clock
// edge after the one that accepted the last pixel (one edge per pipeline
// level, then one for the end detection after the sum).
//
// Own choices: clear is synchronous (the document uses the clear command as
// an asynchronous reset); the configuration registers are also zeroed by the
// system reset.
module dct_coefficient
  import dct_noc_pkg::*;
#(
  parameter int unsigned LOG2_N = 3
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               enable,
  input  logic               clear,
  input  logic [PIXEL_W-1:0] pixel,
  input  logic [PARAM_W-1:0] param_a,
  input  logic [PARAM_W-1:0] param_b,
  input  logic               load_x,
  input  logic               load_y,
  input  logic               load_freq,
  output logic               ready,
  output logic [COEFF_W-1:0] coeff
);
  logic [PARAM_W-1:0] x_start, x_end, y_start, y_end, freq_u, freq_v;
  logic [PARAM_W-1:0] idx_x, idx_y;
  logic               count_ended;
  logic               pipe_rst;
  logic               accept;

  logic               angle_ready, cos_ready, mult_ready, sum_ready;
  logic [LOG2_N+1:0]  angle_x, angle_y;
  logic [PIXEL_W-1:0] pixel_angle, pixel_cos;
  logic [COS_W:0]     cos_x, cos_y;
  logic               negative;
  logic [PROD_W-1:0]  product;
  logic [COEFF_W-1:0] acc;

  assign pipe_rst = rst | clear;
  assign accept   = enable & ~count_ended;

  // Configuration registers
  always_ff @(posedge clk) begin
    if (rst) begin
      x_start <= '0; x_end <= '0;
      y_start <= '0; y_end <= '0;
      freq_u  <= '0; freq_v <= '0;
    end else begin
      if (load_x)    begin x_start <= param_a; x_end <= param_b; end
      if (load_y)    begin y_start <= param_a; y_end <= param_b; end
      if (load_freq) begin freq_u  <= param_a; freq_v <= param_b; end
    end
  end

  // Pixel position counter and end-of-window detection
  always_ff @(posedge clk) begin
    if (pipe_rst) begin
      idx_x       <= x_start;
      idx_y       <= y_start;
      count_ended <= 1'b0;
      ready       <= 1'b0;
      coeff       <= '0;
    end else begin
      if (accept) begin
        if (idx_x == x_end && idx_y == y_end) begin
          count_ended <= 1'b1;
        end else if (idx_x == x_end) begin
          idx_x <= x_start;
          idx_y <= idx_y + 1'b1;
        end else begin
          idx_x <= idx_x + 1'b1;
        end
      end
      ready <= count_ended & sum_ready & ~(angle_ready | cos_ready | mult_ready);
      if (count_ended & sum_ready & ~(angle_ready | cos_ready | mult_ready))
        coeff <= acc;
    end
  end

  dct_angle #(.LOG2_N(LOG2_N)) u_angle_x (
    .clk, .rst(pipe_rst), .enable(accept), .pos(idx_x), .freq(freq_u), .pixel,
    .ready(angle_ready), .pixel_buf(pixel_angle), .rad(angle_x)
  );

  // The y angle unit runs in lock step with the x unit; its ready and pixel
  // copy are the same as the x unit's and are not needed.
  logic               angle_y_ready_unused;
  logic [PIXEL_W-1:0] angle_y_pixel_unused;
  dct_angle #(.LOG2_N(LOG2_N)) u_angle_y (
    .clk, .rst(pipe_rst), .enable(accept), .pos(idx_y), .freq(freq_v), .pixel,
    .ready(angle_y_ready_unused), .pixel_buf(angle_y_pixel_unused), .rad(angle_y)
  );

  dct_cosine #(.LOG2_N(LOG2_N)) u_cosine (
    .clk, .rst(pipe_rst), .enable(angle_ready), .angle_x, .angle_y,
    .pixel(pixel_angle), .ready(cos_ready), .cos_x, .cos_y, .pixel_buf(pixel_cos)
  );

  dct_multiplier u_mult (
    .clk, .rst(pipe_rst), .enable(cos_ready), .pixel(pixel_cos), .cos_x, .cos_y,
    .ready(mult_ready), .negative, .result(product)
  );

  dct_sum u_sum (
    .clk, .rst(pipe_rst), .enable(mult_ready), .plus(product), .negative,
    .ready(sum_ready), .result(acc)
  );
endmodule
