// dct_cosine -- cosine stage of the DCT coefficient pipeline.
//
// Turns the two angles of a basis function (one per axis) into signed cosine
// values. The table holds |cos| for the 2^(LOG2_N+1) angles of [0, pi) in
// steps of pi/(2N); since |cos(a+pi)| = |cos(a)| the angle's top (180 degree)
// bit is dropped to form the table index, and the sign is the XOR of the
// 180 and 90 degree bits (negative in the second and third quadrants).
// Entries are round(|cos(i*pi/(2N))| * 256), 9 bits, 256 standing for 1.0.
// The table is built at elaboration from that formula and read as a
// two-port synchronous memory, like the block RAM the document uses.
//
// Output format: cos_x/cos_y = {sign, magnitude[8:0]}.
// Timing: one clock cycle; outputs and `ready` are valid the cycle after
// `enable`. The document's table is 8 bits wide with the all-ones code
// standing for 1.0; here the 9-bit magnitude is stored directly.
module dct_cosine
  import dct_noc_pkg::*;
#(
  parameter int unsigned LOG2_N = 3
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               enable,
  input  logic [LOG2_N+1:0]  angle_x,
  input  logic [LOG2_N+1:0]  angle_y,
  input  logic [PIXEL_W-1:0] pixel,
  output logic               ready,
  output logic [COS_W:0]     cos_x,
  output logic [COS_W:0]     cos_y,
  output logic [PIXEL_W-1:0] pixel_buf
);
  localparam int unsigned ENTRIES = 2 ** (LOG2_N + 1);

  typedef logic [COS_W-1:0] cos_table_t [ENTRIES];

  function automatic cos_table_t build_table();
    cos_table_t t;
    for (int i = 0; i < ENTRIES; i++) t[i] = cos_sample(i, LOG2_N);
    return t;
  endfunction

  localparam cos_table_t TABLE = build_table();

  logic [COS_W-1:0] mag_x, mag_y;
  logic             sign_x, sign_y;

  always_ff @(posedge clk) begin
    if (rst) begin
      ready     <= 1'b0;
      mag_x     <= '0;
      mag_y     <= '0;
      sign_x    <= 1'b0;
      sign_y    <= 1'b0;
      pixel_buf <= '0;
    end else begin
      ready <= enable;
      if (enable) begin
        mag_x     <= TABLE[angle_x[LOG2_N:0]];
        mag_y     <= TABLE[angle_y[LOG2_N:0]];
        sign_x    <= angle_x[LOG2_N+1] ^ angle_x[LOG2_N];
        sign_y    <= angle_y[LOG2_N+1] ^ angle_y[LOG2_N];
        pixel_buf <= pixel;
      end
    end
  end

  assign cos_x = {sign_x, mag_x};
  assign cos_y = {sign_y, mag_y};
endmodule
