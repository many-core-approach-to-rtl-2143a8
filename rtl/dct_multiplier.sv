// dct_multiplier -- multiplication stage of the DCT coefficient pipeline.
//
// Computes pixel * cos_x * cos_y in fixed point. The two 9-bit cosine
// magnitudes (8 fraction bits) are multiplied and truncated back to 8
// fraction bits, then multiplied by the unsigned pixel, giving a 16-bit
// magnitude with 8 fraction bits (at most 255 * 1.0). The sign is carried
// separately as `negative` = sign_x XOR sign_y, so the sum stage adds or
// subtracts. This split of sign and magnitude and the truncation points
// follow the document.
//
// Timing: inputs registered on `enable`; `result`, `negative` and `ready`
// are valid the following cycle (one cycle latency).
module dct_multiplier
  import dct_noc_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               enable,
  input  logic [PIXEL_W-1:0] pixel,
  input  logic [COS_W:0]     cos_x,
  input  logic [COS_W:0]     cos_y,
  output logic               ready,
  output logic               negative,
  output logic [PROD_W-1:0]  result
);
  logic [PIXEL_W-1:0]   pixel_q;
  logic [COS_W:0]       cos_x_q, cos_y_q;
  logic [2*COS_W-1:0]   cos_prod;
  logic [COS_W-1:0]     cos_prod_q8;
  logic [PIXEL_W+COS_W-1:0] full;

  always_ff @(posedge clk) begin
    if (rst) begin
      ready   <= 1'b0;
      pixel_q <= '0;
      cos_x_q <= '0;
      cos_y_q <= '0;
    end else begin
      ready <= enable;
      if (enable) begin
        pixel_q <= pixel;
        cos_x_q <= cos_x;
        cos_y_q <= cos_y;
      end
    end
  end

  always_comb begin
    cos_prod    = cos_x_q[COS_W-1:0] * cos_y_q[COS_W-1:0];
    cos_prod_q8 = cos_prod[2*COS_W-2:8];          // back to 8 fraction bits, <= 1.0
    full        = {{COS_W{1'b0}}, pixel_q} * {{PIXEL_W{1'b0}}, cos_prod_q8};
    result      = full[PROD_W-1:0];                // at most 255*256, fits
    negative    = cos_x_q[COS_W] ^ cos_y_q[COS_W];
  end
endmodule
